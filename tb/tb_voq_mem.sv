// tb_voq_mem: self-checking test of the VOQ flit memory.
// Writes random flits to random words, keeping a reference copy, and checks
// after every write that each of the NQ read ports returns the reference
// word for a random address. Ends with a TB_RESULT line.
module tb_voq_mem;
  import voq_pkg::*;

  localparam int unsigned NQ = 5, DEPTH = 4, WORDS = NQ * DEPTH;
  localparam int unsigned AW = $clog2(WORDS);

  logic clk = 1'b0;
  logic we;
  logic [AW-1:0] waddr;
  flit_t wdata;
  logic [NQ-1:0][AW-1:0] raddr;
  flit_t [NQ-1:0] rdata;
  flit_t ref_mem [WORDS];
  int checks = 0, failures = 0;

  voq_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    // fill every word once
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a);
      wdata.ftype = ftype_e'($urandom_range(3)); wdata.data = DATA_W'($urandom);
      ref_mem[a] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = ($urandom_range(1) == 1);
      waddr = AW'($urandom_range(WORDS - 1));
      wdata.ftype = ftype_e'($urandom_range(3)); wdata.data = DATA_W'($urandom);
      for (int q = 0; q < NQ; q++) raddr[q] = AW'($urandom_range(WORDS - 1));
      #1;
      for (int q = 0; q < NQ; q++) begin
        checks++;
        if (rdata[q] !== ref_mem[raddr[q]]) begin
          failures++;
          $display("FAIL port %0d addr %0d: got %h want %h", q, raddr[q], rdata[q], ref_mem[raddr[q]]);
        end
      end
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
