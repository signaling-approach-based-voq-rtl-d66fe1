// tb_voq_buffer: self-checking test of the VOQ block (control + memory).
// Pushes random flits into random queues and pops random non-empty queues,
// holding a reference FIFO per queue, and checks every cycle that each
// queue's head flit and its full/empty flags match the reference. Also checks
// that one full queue does not stop pushes into the others (no head-of-line
// blocking inside the block).
module tb_voq_buffer;
  import voq_pkg::*;

  localparam int unsigned NQ = 5, DEPTH = 4;
  localparam int unsigned CW = $clog2(DEPTH + 1), QW = $clog2(NQ);

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en;
  logic [QW-1:0] wr_q;
  flit_t wr_flit;
  logic [NQ-1:0] rd_en;
  flit_t [NQ-1:0] head;
  logic [NQ-1:0] full, empty;
  logic [NQ-1:0][CW-1:0] count;
  flit_t model [NQ][$];
  int checks = 0, failures = 0, bypass = 0;

  voq_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 1'b0; wr_q = '0; wr_flit = '0; rd_en = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int q = 0; q < NQ; q++) begin
        checks++;
        if (full[q] != (model[q].size() == DEPTH) || empty[q] != (model[q].size() == 0)) begin
          failures++;
          $display("FAIL flags q%0d: full=%0d empty=%0d size=%0d", q, full[q], empty[q], model[q].size());
        end
        if (model[q].size() > 0) begin
          checks++;
          if (head[q] !== model[q][0]) begin
            failures++;
            $display("FAIL head q%0d: got %h want %h", q, head[q], model[q][0]);
          end
        end
      end
      wr_q = QW'($urandom_range(NQ - 1));
      wr_flit.ftype = ftype_e'($urandom_range(3));
      wr_flit.data  = DATA_W'($urandom);
      wr_en = (model[wr_q].size() < DEPTH) && ($urandom_range(3) != 0);
      if (wr_en && full != '0) bypass++;
      // queue 0 is drained slowly so it stays full for long stretches
      for (int q = 0; q < NQ; q++)
        rd_en[q] = (model[q].size() > 0) && ($urandom_range(9) < ((q == 0) ? 1 : 5));
      @(posedge clk);
      for (int q = 0; q < NQ; q++) if (rd_en[q]) void'(model[q].pop_front());
      if (wr_en) model[wr_q].push_back(wr_flit);
    end
    checks++;
    if (bypass == 0) begin failures++; $display("FAIL never wrote while another queue was full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
