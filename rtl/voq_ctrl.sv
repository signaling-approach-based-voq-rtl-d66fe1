// voq_ctrl: control unit of the virtual output queues of one input port.
//
// Keeps, for each of the NQ queues, a write pointer, a read pointer and an
// occupancy count inside the queue's fixed region of DEPTH words of voq_mem.
// The input side writes at most one flit per cycle into the queue named by
// wr_q; each queue has its own read strobe, driven by the scheduler of the
// output port the queue belongs to, so all queues can drain in parallel.
//
// full[q] means queue q has no free space; the document calls exactly that
// state congestion, so full[] is also what the signaling block reports to the
// neighbours. Static partitioning of the memory is this design's choice.
//
// Timing: wr_en/rd_en take effect at the rising edge; full, empty, count and
// the addresses are registered state. A write to a full queue or a read from
// an empty queue is a protocol error and is flagged by assertions.
module voq_ctrl
  import voq_pkg::*;
#(
  parameter int unsigned NQ    = NPORTS,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned WORDS = NQ * DEPTH,
  localparam int unsigned AW    = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned PW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW    = $clog2(DEPTH + 1),
  localparam int unsigned QW    = (NQ > 1) ? $clog2(NQ) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [QW-1:0]         wr_q,
  input  logic [NQ-1:0]         rd_en,
  output logic [AW-1:0]         waddr,
  output logic [NQ-1:0][AW-1:0] raddr,
  output logic [NQ-1:0]         full,
  output logic [NQ-1:0]         empty,
  output logic [NQ-1:0][CW-1:0] count
);

  logic [NQ-1:0][PW-1:0] wptr, rptr;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  function automatic logic [AW-1:0] word_addr(input int unsigned q,
                                              input logic [PW-1:0] p);
    return AW'(q * DEPTH + int'(p));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      for (int q = 0; q < NQ; q++) begin
        automatic logic w = wr_en && (int'(wr_q) == q);
        if (w)        wptr[q] <= next_ptr(wptr[q]);
        if (rd_en[q]) rptr[q] <= next_ptr(rptr[q]);
        if (w && !rd_en[q])      count[q] <= count[q] + 1'b1;
        else if (!w && rd_en[q]) count[q] <= count[q] - 1'b1;
      end
    end
  end

  always_comb begin
    waddr = '0;
    for (int q = 0; q < NQ; q++) begin
      full[q]  = (int'(count[q]) == DEPTH);
      empty[q] = (count[q] == '0);
      raddr[q] = word_addr(q, rptr[q]);
      if (int'(wr_q) == q) waddr = word_addr(q, wptr[q]);
    end
  end

  // Handshake rules of the queue interface.
  for (genvar q = 0; q < NQ; q++) begin : g_chk
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      !(wr_en && int'(wr_q) == q && full[q]))
      else $error("voq_ctrl: write to full queue %0d", q);
    a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
      !(rd_en[q] && empty[q]))
      else $error("voq_ctrl: read from empty queue %0d", q);
  end

endmodule
