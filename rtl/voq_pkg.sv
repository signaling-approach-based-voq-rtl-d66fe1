// voq_pkg: types and constants shared by the VOQ router and its blocks.
//
// A link carries one flit per cycle under a valid/ready handshake. A flit is
// a 2-bit type and one data byte. Packets are wormhole packets of a HEAD
// flit, any number of BODY flits and a TAIL flit (two flits at least). The
// HEAD data byte holds the destination coordinates {dst_y, dst_x}, four bits
// each. A SIG flit is a signaling flit: it travels one hop only and its data
// byte holds, one bit per queue, which virtual output queues of the
// receiving-side input port of the sender have no free space.
//
// The five ports (local core plus four mesh neighbours) follow the document;
// the byte-wide flit, the encodings and the coordinate width are choices of
// this design.
package voq_pkg;

  localparam int unsigned NPORTS  = 5;   // router ports: local + N/E/S/W
  localparam int unsigned DATA_W  = 8;   // payload bits per flit (one byte)
  localparam int unsigned COORD_W = 4;   // bits per mesh coordinate
  localparam int unsigned PORT_W  = 3;   // bits to name a port

  // Port numbering. NORTH is +y, EAST is +x.
  localparam logic [PORT_W-1:0] P_LOCAL = 3'd0;
  localparam logic [PORT_W-1:0] P_NORTH = 3'd1;
  localparam logic [PORT_W-1:0] P_EAST  = 3'd2;
  localparam logic [PORT_W-1:0] P_SOUTH = 3'd3;
  localparam logic [PORT_W-1:0] P_WEST  = 3'd4;

  typedef enum logic [1:0] {
    FT_SIG  = 2'd0,   // signaling flit, consumed by the next router
    FT_HEAD = 2'd1,   // first flit of a packet, carries the destination
    FT_BODY = 2'd2,
    FT_TAIL = 2'd3    // last flit of a packet, releases the path
  } ftype_e;

  typedef struct packed {
    ftype_e            ftype;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Port on the other end of a link leaving through port p.
  function automatic logic [PORT_W-1:0] opposite(input logic [PORT_W-1:0] p);
    unique case (p)
      P_NORTH: return P_SOUTH;
      P_SOUTH: return P_NORTH;
      P_EAST:  return P_WEST;
      P_WEST:  return P_EAST;
      default: return P_LOCAL;
    endcase
  endfunction

  function automatic flit_t make_head(input logic [COORD_W-1:0] dx,
                                      input logic [COORD_W-1:0] dy);
    flit_t f;
    f.ftype = FT_HEAD;
    f.data  = {dy, dx};
    return f;
  endfunction

endpackage
