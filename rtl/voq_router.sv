// voq_router: five-port virtual-output-queue wormhole router with a
// signaling block, for one node of a 2D mesh.
//
// Ports 0..4 are LOCAL (the attached core), NORTH, EAST, SOUTH and WEST. Each
// input port has a demux, a routing block and a VOQ block with one queue per
// output port. Each output port has a scheduler that picks, packet by packet,
// one of the five queues bound for it. Because a waiting packet sits in the
// queue of its own output, a blocked output holds back only the traffic for
// that output (no head-of-line blocking between outputs).
//
// The signaling block exchanges one-hop SIG flits with the four neighbours:
// it tells each neighbour which queues of the input port facing it are full,
// and keeps what the neighbours tell it in a table that the routing blocks
// read to steer packets around full queues of the next router (route_unit).
//
// Links: flit_t per port with valid/ready; a flit moves when both are 1.
// out_valid/out_flit do not depend on out_ready; in_ready depends on in_flit
// (the target queue of a HEAD is known only once its destination is routed).
// Latency: a flit accepted at edge t is in its queue after t and can leave on
// the output link in the next cycle, one cycle per router when uncontended.
// X_POS/Y_POS are this router's mesh coordinates. The five ports and the block
// split follow the document; everything inside the blocks is this design's.
module voq_router
  import voq_pkg::*;
#(
  parameter logic [COORD_W-1:0] X_POS     = '0,
  parameter logic [COORD_W-1:0] Y_POS     = '0,
  parameter int unsigned        DEPTH     = 4,
  parameter bit                 ADAPTIVE  = 1'b1,
  parameter logic [NPORTS-1:0]  SIG_PORTS = 5'b11110,
  localparam int unsigned       QW        = $clog2(NPORTS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  flit_t [NPORTS-1:0]  in_flit,
  input  logic  [NPORTS-1:0]  in_valid,
  output logic  [NPORTS-1:0]  in_ready,
  output flit_t [NPORTS-1:0]  out_flit,
  output logic  [NPORTS-1:0]  out_valid,
  input  logic  [NPORTS-1:0]  out_ready
);

  // [input port][queue = output port]
  logic  [NPORTS-1:0][NPORTS-1:0] full, empty, rd_en;
  logic  [NPORTS-1:0][NPORTS-1:0][$clog2(DEPTH+1)-1:0] count;
  flit_t [NPORTS-1:0][NPORTS-1:0] head;
  // [output port][input port]
  logic  [NPORTS-1:0][NPORTS-1:0] req, pop;
  flit_t [NPORTS-1:0][NPORTS-1:0] head_o;

  logic [NPORTS-1:0][COORD_W-1:0] dst_x, dst_y;
  logic [NPORTS-1:0][PORT_W-1:0]  route_port, xy_port;
  logic [NPORTS-1:0]              rerouted, in_packet;
  logic [NPORTS-1:0]              wr_en;
  logic [NPORTS-1:0][QW-1:0]      wr_q;
  flit_t [NPORTS-1:0]             wr_flit;
  logic [NPORTS-1:0]              sig_valid;
  logic [NPORTS-1:0][DATA_W-1:0]  sig_vec;

  logic [NPORTS-1:0]              tx_pending, tx_sent, locked;
  logic [NPORTS-1:0][DATA_W-1:0]  tx_vec, nbr_table;
  logic [NPORTS-1:0][QW-1:0]      owner;

  signaling_block #(.SIG_PORTS(SIG_PORTS)) u_sig (
    .clk, .rst_n,
    .rx_valid(sig_valid), .rx_vec(sig_vec),
    .local_full(full),
    .tx_pending, .tx_vec, .tx_sent,
    .nbr_table
  );

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    route_unit #(.ADAPTIVE(ADAPTIVE)) u_route (
      .cur_x(X_POS), .cur_y(Y_POS),
      .dst_x(dst_x[i]), .dst_y(dst_y[i]),
      .nbr_table,
      .out_port(route_port[i]), .xy_port(xy_port[i]), .rerouted(rerouted[i])
    );

    input_demux #(.NQ(NPORTS)) u_demux (
      .clk, .rst_n,
      .in_flit(in_flit[i]), .in_valid(in_valid[i]), .in_ready(in_ready[i]),
      .dst_x(dst_x[i]), .dst_y(dst_y[i]), .route_port(route_port[i]),
      .voq_full(full[i]),
      .wr_en(wr_en[i]), .wr_q(wr_q[i]), .wr_flit(wr_flit[i]),
      .sig_valid(sig_valid[i]), .sig_vec(sig_vec[i]),
      .in_packet(in_packet[i])
    );

    voq_buffer #(.NQ(NPORTS), .DEPTH(DEPTH)) u_voq (
      .clk, .rst_n,
      .wr_en(wr_en[i]), .wr_q(wr_q[i]), .wr_flit(wr_flit[i]),
      .rd_en(rd_en[i]), .head(head[i]),
      .full(full[i]), .empty(empty[i]),
      .count(count[i])
    );
  end

  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      for (int i = 0; i < NPORTS; i++) begin
        req[o][i]    = !empty[i][o];
        head_o[o][i] = head[i][o];
        rd_en[i][o]  = pop[o][i];
      end
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    out_scheduler #(.NIN(NPORTS)) u_sched (
      .clk, .rst_n,
      .req(req[o]), .head(head_o[o]), .pop(pop[o]),
      .sig_pending(tx_pending[o]), .sig_vec(tx_vec[o]), .sig_sent(tx_sent[o]),
      .out_flit(out_flit[o]), .out_valid(out_valid[o]), .out_ready(out_ready[o]),
      .locked(locked[o]), .owner(owner[o])
    );
  end

endmodule
