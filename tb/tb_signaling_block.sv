// tb_signaling_block: self-checking test of the signaling block.
// Random signaling flits arrive on random ports while the local queue-full
// flags change at random and the test acknowledges pending signaling flits at
// random. A reference model keeps the neighbour table and the last state sent
// per port. Checks the table, that a signaling flit
// is pending exactly when the local state differs from the last one sent, its
// contents, and that the local port (bit 0 of SIG_PORTS clear) is ignored.
module tb_signaling_block;
  import voq_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NPORTS-1:0] rx_valid;
  logic [NPORTS-1:0][DATA_W-1:0] rx_vec;
  logic [NPORTS-1:0][NPORTS-1:0] local_full;
  logic [NPORTS-1:0] tx_pending, tx_sent;
  logic [NPORTS-1:0][DATA_W-1:0] tx_vec, nbr_table;
  logic [NPORTS-1:0][DATA_W-1:0] m_tbl;
  logic [NPORTS-1:0][NPORTS-1:0] m_last;
  int checks = 0, failures = 0, sent = 0, updates = 0;

  signaling_block dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: got %0h want %0h", what, got, want); end
  endtask

  initial begin
    rx_valid = '0; rx_vec = '0; local_full = '0; tx_sent = '0;
    m_tbl = '0; m_last = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < NPORTS; p++) begin
        check($sformatf("table[%0d]", p), int'(nbr_table[p]), int'(m_tbl[p]));
      end
      for (int p = 0; p < NPORTS; p++) begin
        rx_valid[p] = ($urandom_range(7) == 0);
        // mostly "no congestion" so that cong toggles both ways
        rx_vec[p] = ($urandom_range(1) == 0) ? '0 : DATA_W'(1 << $urandom_range(NPORTS - 1));
        if ($urandom_range(15) == 0) local_full[p] = NPORTS'($urandom);
      end
      #1;
      for (int p = 0; p < NPORTS; p++) begin
        automatic bit want_pend = (p != 0) && (local_full[p] != m_last[p]);
        check($sformatf("tx_pending[%0d]", p), int'(tx_pending[p]), int'(want_pend));
        check($sformatf("tx_vec[%0d]", p), int'(tx_vec[p]), int'(local_full[p]));
        tx_sent[p] = tx_pending[p] && ($urandom_range(2) != 0);
      end
      @(posedge clk);
      for (int p = 1; p < NPORTS; p++) begin
        if (rx_valid[p]) begin m_tbl[p] = rx_vec[p]; updates++; end
        if (tx_sent[p]) begin m_last[p] = local_full[p]; sent++; end
      end
    end
    checks++;
    if (sent == 0 || updates == 0) begin failures++; $display("FAIL sent=%0d updates=%0d", sent, updates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
