// noc_mesh: COLS x ROWS two-dimensional mesh of voq_router nodes.
//
// Router (x, y) sits at node index y*COLS + x. Its NORTH port links to
// (x, y+1), EAST to (x+1, y), SOUTH to (x, y-1) and WEST to (x-1, y); each
// link is a pair of opposite one-way flit channels with valid/ready. Ports at
// the mesh edge are tied off: nothing arrives on them, and their outputs are
// always ready so signaling flits sent there are simply dropped (routing never
// sends a packet off the mesh, every choice it makes is minimal).
//
// The LOCAL port of every router is brought out, indexed by node, for the
// core attached to that node. A packet enters at the source node's local
// input as HEAD {dst_y, dst_x}, BODY..., TAIL, and leaves, flits in order, at
// the destination's local output. The mesh topology follows the document; its
// size is not given there and the 3 x 3 default is this design's choice (the
// smallest mesh with a router that uses all five ports).
module noc_mesh
  import voq_pkg::*;
#(
  parameter int unsigned COLS     = 3,
  parameter int unsigned ROWS     = 3,
  parameter int unsigned DEPTH    = 4,
  parameter bit          ADAPTIVE = 1'b1,
  localparam int unsigned NODES   = COLS * ROWS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  flit_t [NODES-1:0]  local_in_flit,
  input  logic  [NODES-1:0]  local_in_valid,
  output logic  [NODES-1:0]  local_in_ready,
  output flit_t [NODES-1:0]  local_out_flit,
  output logic  [NODES-1:0]  local_out_valid,
  input  logic  [NODES-1:0]  local_out_ready
);

  flit_t [NODES-1:0][NPORTS-1:0] r_in_flit, r_out_flit;
  logic  [NODES-1:0][NPORTS-1:0] r_in_valid, r_in_ready, r_out_valid, r_out_ready;

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col
      localparam int unsigned N = y * COLS + x;

      voq_router #(
        .X_POS(COORD_W'(x)), .Y_POS(COORD_W'(y)),
        .DEPTH(DEPTH), .ADAPTIVE(ADAPTIVE)
      ) u_router (
        .clk, .rst_n,
        .in_flit(r_in_flit[N]), .in_valid(r_in_valid[N]), .in_ready(r_in_ready[N]),
        .out_flit(r_out_flit[N]), .out_valid(r_out_valid[N]), .out_ready(r_out_ready[N])
      );

      // local port
      assign r_in_flit[N][P_LOCAL]   = local_in_flit[N];
      assign r_in_valid[N][P_LOCAL]  = local_in_valid[N];
      assign local_in_ready[N]       = r_in_ready[N][P_LOCAL];
      assign local_out_flit[N]       = r_out_flit[N][P_LOCAL];
      assign local_out_valid[N]      = r_out_valid[N][P_LOCAL];
      assign r_out_ready[N][P_LOCAL] = local_out_ready[N];

      // mesh ports; an edge port without a neighbour is tied off
      if (y + 1 < ROWS) begin : g_north
        assign r_in_flit[N][P_NORTH]   = r_out_flit[N + COLS][P_SOUTH];
        assign r_in_valid[N][P_NORTH]  = r_out_valid[N + COLS][P_SOUTH];
        assign r_out_ready[N][P_NORTH] = r_in_ready[N + COLS][P_SOUTH];
      end else begin : g_north_edge
        assign r_in_flit[N][P_NORTH]   = '0;
        assign r_in_valid[N][P_NORTH]  = 1'b0;
        assign r_out_ready[N][P_NORTH] = 1'b1;
      end

      if (x + 1 < COLS) begin : g_east
        assign r_in_flit[N][P_EAST]   = r_out_flit[N + 1][P_WEST];
        assign r_in_valid[N][P_EAST]  = r_out_valid[N + 1][P_WEST];
        assign r_out_ready[N][P_EAST] = r_in_ready[N + 1][P_WEST];
      end else begin : g_east_edge
        assign r_in_flit[N][P_EAST]   = '0;
        assign r_in_valid[N][P_EAST]  = 1'b0;
        assign r_out_ready[N][P_EAST] = 1'b1;
      end

      if (y > 0) begin : g_south
        assign r_in_flit[N][P_SOUTH]   = r_out_flit[N - COLS][P_NORTH];
        assign r_in_valid[N][P_SOUTH]  = r_out_valid[N - COLS][P_NORTH];
        assign r_out_ready[N][P_SOUTH] = r_in_ready[N - COLS][P_NORTH];
      end else begin : g_south_edge
        assign r_in_flit[N][P_SOUTH]   = '0;
        assign r_in_valid[N][P_SOUTH]  = 1'b0;
        assign r_out_ready[N][P_SOUTH] = 1'b1;
      end

      if (x > 0) begin : g_west
        assign r_in_flit[N][P_WEST]   = r_out_flit[N - 1][P_EAST];
        assign r_in_valid[N][P_WEST]  = r_out_valid[N - 1][P_EAST];
        assign r_out_ready[N][P_WEST] = r_in_ready[N - 1][P_EAST];
      end else begin : g_west_edge
        assign r_in_flit[N][P_WEST]   = '0;
        assign r_in_valid[N][P_WEST]  = 1'b0;
        assign r_out_ready[N][P_WEST] = 1'b1;
      end
    end
  end

endmodule
