// voq_buffer: the Virtual Output Queue block of one input port.
//
// Holds one FIFO queue per output port of the router (NQ queues), so a flit
// waiting for a busy output never blocks flits of the same input bound for
// another output (no head-of-line blocking). It is the control unit
// (voq_ctrl) plus the memory block (voq_mem), as the document splits it.
//
// Interface: wr_en/wr_q/wr_flit push a flit into queue wr_q (only when
// !full[wr_q]); head[q] is the oldest flit of queue q, valid while
// !empty[q]; rd_en[q] pops it. Timing: push and pop act at the rising edge;
// a flit written in cycle t is visible at head[] in cycle t+1. Queue depth
// is this design's choice; the document gives none.
module voq_buffer
  import voq_pkg::*;
#(
  parameter int unsigned NQ    = NPORTS,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned WORDS = NQ * DEPTH,
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned CW    = $clog2(DEPTH + 1),
  localparam int unsigned QW    = (NQ > 1) ? $clog2(NQ) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [QW-1:0]         wr_q,
  input  flit_t                 wr_flit,
  input  logic [NQ-1:0]         rd_en,
  output flit_t [NQ-1:0]        head,
  output logic [NQ-1:0]         full,
  output logic [NQ-1:0]         empty,
  output logic [NQ-1:0][CW-1:0] count
);

  logic [AW-1:0]         waddr;
  logic [NQ-1:0][AW-1:0] raddr;

  voq_ctrl #(.NQ(NQ), .DEPTH(DEPTH)) u_ctrl (
    .clk, .rst_n, .wr_en, .wr_q, .rd_en,
    .waddr, .raddr, .full, .empty, .count
  );

  voq_mem #(.NQ(NQ), .DEPTH(DEPTH)) u_mem (
    .clk, .we(wr_en), .waddr, .wdata(wr_flit), .raddr, .rdata(head)
  );

endmodule
