// tb_voq_ctrl: self-checking test of the VOQ control unit.
// Random pushes into random queues and random pops of non-empty queues,
// never to a full queue. A reference model keeps per-queue pointers and
// counts; every cycle the test compares full, empty, count, the write
// address and all read addresses (queue q owns words q*DEPTH .. q*DEPTH+DEPTH-1).
module tb_voq_ctrl;
  import voq_pkg::*;

  localparam int unsigned NQ = 5, DEPTH = 3, WORDS = NQ * DEPTH;
  localparam int unsigned AW = $clog2(WORDS), CW = $clog2(DEPTH + 1), QW = $clog2(NQ);

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en;
  logic [QW-1:0] wr_q;
  logic [NQ-1:0] rd_en;
  logic [AW-1:0] waddr;
  logic [NQ-1:0][AW-1:0] raddr;
  logic [NQ-1:0] full, empty;
  logic [NQ-1:0][CW-1:0] count;
  int m_w[NQ], m_r[NQ], m_c[NQ];
  int checks = 0, failures = 0, saw_full = 0;

  voq_ctrl #(.NQ(NQ), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    wr_en = 1'b0; wr_q = '0; rd_en = '0;
    for (int q = 0; q < NQ; q++) begin m_w[q] = 0; m_r[q] = 0; m_c[q] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // compare state with the model
      for (int q = 0; q < NQ; q++) begin
        check($sformatf("count[%0d]", q), int'(count[q]), m_c[q]);
        check($sformatf("full[%0d]", q), int'(full[q]), int'(m_c[q] == DEPTH));
        check($sformatf("empty[%0d]", q), int'(empty[q]), int'(m_c[q] == 0));
        check($sformatf("raddr[%0d]", q), int'(raddr[q]), q * DEPTH + m_r[q]);
        if (m_c[q] == DEPTH) saw_full++;
      end
      // new stimulus, biased to fill the queues in the first half
      wr_q  = QW'($urandom_range(NQ - 1));
      wr_en = (m_c[wr_q] < DEPTH) && ($urandom_range(9) < ((n < 1500) ? 8 : 4));
      for (int q = 0; q < NQ; q++)
        rd_en[q] = (m_c[q] > 0) && ($urandom_range(9) < ((n < 1500) ? 2 : 6));
      #1;
      check("waddr", int'(waddr), int'(wr_q) * DEPTH + m_w[wr_q]);
      if (wr_en) begin m_w[wr_q] = (m_w[wr_q] + 1) % DEPTH; m_c[wr_q]++; end
      for (int q = 0; q < NQ; q++)
        if (rd_en[q]) begin m_r[q] = (m_r[q] + 1) % DEPTH; m_c[q]--; end
    end
    checks++;
    if (saw_full == 0) begin failures++; $display("FAIL no queue ever became full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
