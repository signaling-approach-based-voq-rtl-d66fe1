// out_scheduler: scheduler (arbitration block) of one output port.
//
// Every input port keeps one virtual output queue for this output; req[i] is
// 1 when that queue holds a flit and head[i] is its oldest flit. While the
// output is free, a round-robin arbiter picks one requesting queue. When the
// HEAD flit of the chosen queue leaves, the output locks to that input until
// the TAIL flit has left (wormhole switching), so the flits of a packet stay
// together on the link; other inputs wait in their own queues meanwhile.
//
// A pending signaling flit from the signaling block (sig_pending/sig_vec) has
// priority over data for one cycle; it may fall between two flits of a
// packet, since the next router takes it off the link before its queues.
//
// Link handshake: out_valid/out_flit are computed from registered state only
// (no path from out_ready), a flit moves when out_valid && out_ready.
// Timing: a flit at the head of a queue in cycle t leaves in cycle t when the
// output is free and ready. The document names the scheduler; round robin,
// packet locking and signaling priority are this design's choices.
module out_scheduler
  import voq_pkg::*;
#(
  parameter int unsigned NIN = NPORTS,
  localparam int unsigned IW = (NIN > 1) ? $clog2(NIN) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // virtual output queues bound for this output
  input  logic [NIN-1:0]     req,
  input  flit_t [NIN-1:0]    head,
  output logic [NIN-1:0]     pop,
  // signaling flit to insert
  input  logic               sig_pending,
  input  logic [DATA_W-1:0]  sig_vec,
  output logic               sig_sent,
  // outgoing link
  output flit_t              out_flit,
  output logic               out_valid,
  input  logic               out_ready,
  // status
  output logic               locked,
  output logic [IW-1:0]      owner
);

  logic [NIN-1:0] grant;
  logic [IW-1:0]  grant_idx, sel;
  logic           data_valid, xfer;

  rr_arbiter #(.N(NIN)) u_arb (
    .clk, .rst_n, .req, .advance(xfer && !locked), .grant, .grant_idx
  );

  always_comb begin
    sel        = locked ? owner : grant_idx;
    data_valid = locked ? req[owner] : (req != '0);
    out_valid  = sig_pending || data_valid;
    if (sig_pending) begin
      out_flit.ftype = FT_SIG;
      out_flit.data  = sig_vec;
    end else begin
      out_flit = head[sel];
    end
  end

  // Handshake side, kept apart so nothing on the link outputs reads out_ready.
  always_comb begin
    sig_sent = sig_pending && out_ready;
    xfer     = !sig_pending && data_valid && out_ready;
    pop      = '0;
    pop[sel] = xfer;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      owner  <= '0;
    end else if (xfer) begin
      locked <= (head[sel].ftype != FT_TAIL);
      owner  <= sel;
    end
  end

  a_head_when_free: assert property (@(posedge clk) disable iff (!rst_n)
    (xfer && !locked) |-> head[sel].ftype == FT_HEAD)
    else $error("out_scheduler: packet does not start with HEAD");

endmodule
