// route_unit: routing block of one input port (combinational).
//
// Computes the output port of a packet from its head flit. The base rule is
// dimension-ordered XY routing on the 2D mesh: correct x first (EAST/WEST),
// then y (NORTH/SOUTH), then deliver to LOCAL.
//
// When ADAPTIVE is set the routing block also reads the neighbour table of the
// signaling block. Entry p holds, one bit per queue, which virtual output
// queues of the neighbour behind port p have no free space. For each possible
// next hop the block works out which queue the packet would enter there (the
// queue of the output the neighbour's XY rule gives it) and calls that hop
// congested when that queue is full. An eastbound packet that still has to
// move in both dimensions takes its y hop first when the EAST hop is
// congested and the y hop is not. Both choices are minimal, so a packet never
// moves away from its target.
//
// Westbound packets are never diverted: that keeps the rule inside the
// west-first turn model (no turn from NORTH/SOUTH into WEST), which is free of
// routing deadlock with wormhole switching; letting westbound packets turn as
// well was found to deadlock the mesh under load.
//
// xy_port is the plain XY answer; rerouted is 1 when the adaptive rule
// overrode it. The document asks for XY routing that adapts to congestion but
// does not give the rule; the rule above is this design's choice.
module route_unit
  import voq_pkg::*;
#(
  parameter bit ADAPTIVE = 1'b1
) (
  input  logic [COORD_W-1:0]             cur_x,
  input  logic [COORD_W-1:0]             cur_y,
  input  logic [COORD_W-1:0]             dst_x,
  input  logic [COORD_W-1:0]             dst_y,
  input  logic [NPORTS-1:0][DATA_W-1:0]  nbr_table,
  output logic [PORT_W-1:0]              out_port,
  output logic [PORT_W-1:0]              xy_port,
  output logic                           rerouted
);

  logic [PORT_W-1:0] xdir, ydir, q_east, q_y;
  logic              need_x, need_y, cong_east, cong_y;

  always_comb begin
    need_x = (dst_x != cur_x);
    need_y = (dst_y != cur_y);
    xdir   = (dst_x > cur_x) ? P_EAST  : P_WEST;
    ydir   = (dst_y > cur_y) ? P_NORTH : P_SOUTH;

    if (need_x)      xy_port = xdir;
    else if (need_y) xy_port = ydir;
    else             xy_port = P_LOCAL;

    // queue the packet would enter at the EAST neighbour (x+1, y)
    if (dst_x != cur_x + 1'b1) q_east = P_EAST;
    else if (need_y)           q_east = ydir;
    else                       q_east = P_LOCAL;
    // at the y neighbour the packet still has x distance left: EAST queue
    q_y = P_EAST;

    cong_east = nbr_table[P_EAST][q_east];
    cong_y    = nbr_table[ydir][q_y];

    out_port = xy_port;
    rerouted = 1'b0;
    if (ADAPTIVE && need_x && need_y && xdir == P_EAST && cong_east && !cong_y) begin
      out_port = ydir;
      rerouted = 1'b1;
    end
  end

endmodule
