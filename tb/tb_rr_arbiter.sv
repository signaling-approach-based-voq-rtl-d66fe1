// tb_rr_arbiter: self-checking test of the round-robin arbiter.
// Random request patterns with random advance strobes against a reference
// pointer model: the grant must be the first requester at or after the
// pointer, and after an advance the pointer moves just past the winner. Also
// checks that with all five requesting and advance every cycle, each gets
// exactly one grant in every five cycles.
module tb_rr_arbiter;
  localparam int unsigned N = 5, IW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req, grant;
  logic advance;
  logic [IW-1:0] grant_idx;
  int ptr = 0;
  int checks = 0, failures = 0;
  int wins[N];

  rr_arbiter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; advance = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      automatic int want = -1;
      @(negedge clk);
      req = N'($urandom);
      advance = ($urandom_range(1) == 1);
      for (int k = N - 1; k >= 0; k--) if (req[(ptr + k) % N]) want = (ptr + k) % N;
      #1;
      checks++;
      if (want < 0) begin
        if (grant != '0) begin failures++; $display("FAIL grant without request"); end
      end else if (grant != N'(1 << want) || int'(grant_idx) != want) begin
        failures++;
        $display("FAIL req=%b ptr=%0d: grant=%b want %0d", req, ptr, grant, want);
      end
      @(posedge clk);
      if (advance && want >= 0) ptr = (want + 1) % N;
    end
    // fairness under full load
    @(negedge clk);
    req = '1; advance = 1'b1;
    for (int k = 0; k < N; k++) wins[k] = 0;
    for (int n = 0; n < 5 * N; n++) begin
      #1;
      wins[grant_idx]++;
      @(negedge clk);
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (wins[k] != 5) begin failures++; $display("FAIL requester %0d won %0d of 25", k, wins[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
