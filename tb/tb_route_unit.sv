// tb_route_unit: self-checking test of the routing block.
// Sweeps every current/destination pair of a 5 x 5 mesh, each with 32 random
// neighbour tables (biased so that single queues are full), for the adaptive
// and the plain XY instance, and compares with a reference written from the
// rule: XY order, except that an eastbound packet with y distance left goes
// along y first when the queue it would enter at the EAST neighbour is full
// and the EAST queue of the y neighbour is not.
module tb_route_unit;
  import voq_pkg::*;

  logic [COORD_W-1:0] cur_x, cur_y, dst_x, dst_y;
  logic [NPORTS-1:0][DATA_W-1:0] nbr_table;
  logic [PORT_W-1:0] out_a, xy_a, out_x, xy_x;
  logic rer_a, rer_x;
  int checks = 0, failures = 0, reroutes = 0;

  route_unit #(.ADAPTIVE(1'b1)) dut_a (.cur_x, .cur_y, .dst_x, .dst_y, .nbr_table,
                                       .out_port(out_a), .xy_port(xy_a), .rerouted(rer_a));
  route_unit #(.ADAPTIVE(1'b0)) dut_x (.cur_x, .cur_y, .dst_x, .dst_y, .nbr_table,
                                       .out_port(out_x), .xy_port(xy_x), .rerouted(rer_x));

  // XY output a router at (x, y) gives a packet for (dx, dy)
  function automatic int xy(input int x, input int y, input int dx, input int dy);
    if (dx > x) return P_EAST;
    if (dx < x) return P_WEST;
    if (dy > y) return P_NORTH;
    if (dy < y) return P_SOUTH;
    return P_LOCAL;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cx = 0; cx < 5; cx++) for (int cy = 0; cy < 5; cy++)
    for (int dx = 0; dx < 5; dx++) for (int dy = 0; dy < 5; dy++)
    for (int c = 0; c < 32; c++) begin
      automatic int want_xy, want_ad, yd;
      automatic bit ce, cyn;
      for (int p = 0; p < NPORTS; p++)
        nbr_table[p] = DATA_W'($urandom & $urandom & 32'h1f);
      cur_x = COORD_W'(cx); cur_y = COORD_W'(cy);
      dst_x = COORD_W'(dx); dst_y = COORD_W'(dy);
      want_xy = xy(cx, cy, dx, dy);
      want_ad = want_xy;
      yd = (dy > cy) ? P_NORTH : P_SOUTH;
      if (dx > cx && dy != cy) begin
        ce  = nbr_table[P_EAST][xy(cx + 1, cy, dx, dy)];
        cyn = nbr_table[yd][xy(cx, (dy > cy) ? cy + 1 : cy - 1, dx, dy)];
        if (ce && !cyn) want_ad = yd;
      end
      #1;
      checks += 2;
      if (int'(out_x) != want_xy || int'(xy_x) != want_xy || rer_x) begin
        failures++;
        $display("FAIL XY (%0d,%0d)->(%0d,%0d): got %0d want %0d", cx, cy, dx, dy, out_x, want_xy);
      end
      if (int'(out_a) != want_ad || int'(xy_a) != want_xy || rer_a !== (want_ad != want_xy)) begin
        failures++;
        $display("FAIL adaptive (%0d,%0d)->(%0d,%0d) table=%h: got %0d want %0d", cx, cy, dx, dy, nbr_table, out_a, want_ad);
      end
      if (rer_a) reroutes++;
    end
    checks++;
    if (reroutes == 0) begin failures++; $display("FAIL adaptive rule never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
