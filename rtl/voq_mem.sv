// voq_mem: flit storage of one input port (the "memory block" of a VOQ).
//
// NQ*DEPTH flit words, statically split into NQ regions of DEPTH words, one
// region per virtual output queue. One write port (the input demux writes at
// most one flit per cycle) and NQ asynchronous read ports, so that every
// output port can read the head of its own queue in the same cycle.
//
// Timing: a write lands at the rising clock edge; reads are combinational.
// The words have no reset: the control unit never reads a word it has not
// written. Sizes and port structure are choices of this design; the document
// only says the VOQ holds a memory for the data bytes.
module voq_mem
  import voq_pkg::*;
#(
  parameter int unsigned NQ    = NPORTS,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned WORDS = NQ * DEPTH,
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  flit_t                wdata,
  input  logic [NQ-1:0][AW-1:0] raddr,
  output flit_t [NQ-1:0]       rdata
);

  flit_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int q = 0; q < NQ; q++) rdata[q] = mem[raddr[q]];
  end

endmodule
