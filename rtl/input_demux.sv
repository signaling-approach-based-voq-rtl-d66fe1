// input_demux: the demultiplexer of one input port.
//
// Takes flits from the incoming link and steers each into the virtual output
// queue of the output port it must leave by. A HEAD flit is steered by the
// answer of the routing block (route_port, computed from the destination
// this block presents on dst_x/dst_y); the answer is latched, and the BODY and
// TAIL flits of the same packet follow it into the same queue (wormhole). A
// SIG flit never enters a queue: it is accepted at once and handed to the
// signaling block on sig_valid/sig_vec.
//
// Link handshake: a flit moves when in_valid && in_ready. in_ready is 1 for a
// SIG flit, and otherwise 1 when the target queue has free space, so only the
// queue the flit needs can hold the link. Timing: the queue write happens at
// the same rising edge as the link transfer.
// The demux is named by the document; its inner workings are this design's.
module input_demux
  import voq_pkg::*;
#(
  parameter int unsigned NQ = NPORTS,
  localparam int unsigned QW = (NQ > 1) ? $clog2(NQ) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // incoming link
  input  flit_t              in_flit,
  input  logic               in_valid,
  output logic               in_ready,
  // routing block
  output logic [COORD_W-1:0] dst_x,
  output logic [COORD_W-1:0] dst_y,
  input  logic [PORT_W-1:0]  route_port,
  // virtual output queues
  input  logic [NQ-1:0]      voq_full,
  output logic               wr_en,
  output logic [QW-1:0]      wr_q,
  output flit_t              wr_flit,
  // signaling block
  output logic               sig_valid,
  output logic [DATA_W-1:0]  sig_vec,
  // status
  output logic               in_packet
);

  logic [QW-1:0] cur_q;
  logic          is_sig, is_head;

  always_comb begin
    is_sig  = (in_flit.ftype == FT_SIG);
    is_head = (in_flit.ftype == FT_HEAD);
    dst_x   = in_flit.data[COORD_W-1:0];
    dst_y   = in_flit.data[2*COORD_W-1:COORD_W];
    wr_q    = is_head ? QW'(route_port) : cur_q;
    wr_flit = in_flit;
    in_ready  = is_sig ? 1'b1 : !voq_full[wr_q];
    wr_en     = in_valid && !is_sig && !voq_full[wr_q];
    sig_valid = in_valid && is_sig;
    sig_vec   = in_flit.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q     <= '0;
      in_packet <= 1'b0;
    end else if (wr_en) begin
      if (is_head) cur_q <= QW'(route_port);
      in_packet <= (in_flit.ftype != FT_TAIL);
    end
  end

  a_head_starts_packet: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_flit.ftype == FT_HEAD) |-> !in_packet)
    else $error("input_demux: HEAD flit inside a packet");
  a_body_in_packet: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && (in_flit.ftype == FT_BODY || in_flit.ftype == FT_TAIL)) |-> in_packet)
    else $error("input_demux: BODY/TAIL flit outside a packet");

endmodule
