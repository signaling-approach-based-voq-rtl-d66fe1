// tb_voq_router: self-checking test of one router at mesh position (1,1).
// The test plays the local core and the four neighbours. Each of the five
// inputs sends packets {HEAD dst, id_hi, id_lo, payload..., TAIL} to random
// nodes of a 3 x 3 mesh; each output has a random ready. Packets are checked
// at the output they leave by: the right port, all flits, in order, exactly
// once. Three phases:
//   0: no congestion signaled: every packet must take its XY port; the first
//      packet goes alone and must leave one cycle after it was accepted.
//   1: the test tells the EAST neighbour that its NORTH and SOUTH queues are
//      full and the WEST neighbour that its EAST queue is full, NORTH and SOUTH
//      report nothing: eastbound packets with y distance left must turn to y
//      first; all others keep their XY port.
//   2: random signaling flits in flight: XY port or its y alternative.
// One output is held not ready for a while in every phase, so queues fill,
// inputs stall, and the router must send signaling flits naming the full
// queues; once all has drained its last signaling flit on each port must say
// "no full queue". Local output must never carry a signaling flit.
module tb_voq_router;
  import voq_pkg::*;

  localparam logic [COORD_W-1:0] MX = 4'd1, MY = 4'd1;
  localparam int unsigned PER_PHASE = 60;   // packets per input per phase

  logic clk = 1'b0, rst_n = 1'b0;
  flit_t [NPORTS-1:0] in_flit, out_flit;
  logic  [NPORTS-1:0] in_valid, in_ready, out_valid, out_ready;

  voq_router #(.X_POS(MX), .Y_POS(MY)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++;
    $display("FAIL [%0d] %s", cycle, s);
  endtask

  function automatic logic [7:0] pay(input int id, input int k);
    return 8'((id * 7 + k * 13) & 8'hff);
  endfunction

  // XY port and its adaptive alternative from (1,1)
  function automatic int xy_port(input int dx, input int dy);
    if (dx != MX) return (dx > MX) ? P_EAST : P_WEST;
    if (dy != MY) return (dy > MY) ? P_NORTH : P_SOUTH;
    return P_LOCAL;
  endfunction
  function automatic int alt_port(input int dx, input int dy);
    if (dx > MX && dy != MY) return (dy > MY) ? P_NORTH : P_SOUTH;
    return xy_port(dx, dy);
  endfunction

  // ---- sources and scoreboard
  flit_t src_q [NPORTS][$];
  int    exp_dx [int], exp_dy [int], exp_len [int], got [int];
  int    acc_cycle [int];
  int    next_id = 0, sent_pkts = 0, recv_pkts = 0;
  int    phase = 0;
  int    stalls = 0, sig_flits = 0, sig_full = 0, y_first = 0, lone_checked = 0;
  logic [NPORTS-1:0][DATA_W-1:0] last_sig;
  // tb-side injected signaling flits per mesh port
  logic [NPORTS-1:0] inj_pend;
  logic [NPORTS-1:0][DATA_W-1:0] inj_vec;
  int blocked_port = -1, block_left = 0;
  // per-output reassembly
  flit_t rx [NPORTS][$];

  task automatic new_packet(input int p, input int dx, input int dy);
    automatic int len = $urandom_range(4, 7);
    automatic int id = next_id++;
    automatic flit_t f;
    exp_dx[id] = dx; exp_dy[id] = dy; exp_len[id] = len;
    for (int k = 0; k < len; k++) begin
      f.ftype = (k == 0) ? FT_HEAD : (k == len - 1) ? FT_TAIL : FT_BODY;
      f.data  = (k == 0) ? {4'(dy), 4'(dx)} : (k == 1) ? 8'(id >> 8) : (k == 2) ? 8'(id) : pay(id, k);
      src_q[p].push_back(f);
    end
    sent_pkts++;
  endtask

  task automatic check_packet(input int port);
    automatic int id, dx, dy;
    checks++;
    if (rx[port].size() < 4) begin fail("short packet"); rx[port].delete(); return; end
    dx = int'(rx[port][0].data[3:0]); dy = int'(rx[port][0].data[7:4]);
    id = {rx[port][1].data, rx[port][2].data};
    if (!exp_len.exists(id)) begin fail($sformatf("unknown id %0d", id)); rx[port].delete(); return; end
    if (got.exists(id)) fail($sformatf("packet %0d twice", id));
    got[id] = 1;
    recv_pkts++;
    if (dx != exp_dx[id] || dy != exp_dy[id]) fail("head changed");
    if (rx[port].size() != exp_len[id]) fail($sformatf("packet %0d length %0d", id, rx[port].size()));
    for (int k = 3; k < rx[port].size(); k++)
      if (rx[port][k].data != pay(id, k)) fail($sformatf("packet %0d flit %0d data", id, k));
    if (phase == 0) begin
      if (port != xy_port(dx, dy)) fail($sformatf("phase 0: packet %0d to (%0d,%0d) left by %0d", id, dx, dy, port));
    end else if (phase == 1) begin
      if (port != alt_port(dx, dy)) fail($sformatf("phase 1: packet %0d to (%0d,%0d) left by %0d", id, dx, dy, port));
      if (port != xy_port(dx, dy)) y_first++;
    end else begin
      if (port != xy_port(dx, dy) && port != alt_port(dx, dy)) fail("phase 2: not a minimal port");
    end
    rx[port].delete();
  endtask

  // one clock cycle of all sources and sinks
  task automatic step(input int src_prob, input bit rand_sig);
    logic [NPORTS-1:0] take_in, take_out;
    @(negedge clk);
    for (int p = 0; p < NPORTS; p++) begin
      if (p != 0 && rand_sig && !inj_pend[p] && $urandom_range(15) == 0) begin
        inj_pend[p] = 1'b1;
        inj_vec[p]  = ($urandom_range(1) == 0) ? '0 : 8'(1 << $urandom_range(4));
      end
      if (inj_pend[p]) begin
        in_valid[p] = 1'b1; in_flit[p].ftype = FT_SIG; in_flit[p].data = inj_vec[p];
      end else begin
        in_valid[p] = (src_q[p].size() > 0) && ($urandom_range(99) < src_prob);
        in_flit[p]  = (src_q[p].size() > 0) ? src_q[p][0] : flit_t'(0);
      end
      out_ready[p] = (p == blocked_port) ? 1'b0 : ($urandom_range(3) != 0);
    end
    if (block_left > 0) block_left--; else blocked_port = -1;
    #4;
    take_in  = in_valid & in_ready;
    take_out = out_valid & out_ready;
    for (int p = 0; p < NPORTS; p++) begin
      if (in_valid[p] && !in_ready[p]) stalls++;
      if (take_in[p]) begin
        if (inj_pend[p]) inj_pend[p] = 1'b0;
        else begin
          if (src_q[p][0].ftype == FT_HEAD && lone_checked == 0) acc_cycle[0] = cycle;
          void'(src_q[p].pop_front());
        end
      end
      if (take_out[p]) begin
        if (out_flit[p].ftype == FT_SIG) begin
          sig_flits++;
          if (p == 0) fail("signaling flit on the local port");
          if (out_flit[p].data[7:5] != 0) fail("signaling flit with bits above the queue flags");
          if (out_flit[p].data != 0) sig_full++;
          last_sig[p] = out_flit[p].data;
        end else begin
          rx[p].push_back(out_flit[p]);
          if (out_flit[p].ftype == FT_TAIL) check_packet(p);
        end
      end
    end
  endtask

  task automatic drain();
    int n = 0;
    while ((recv_pkts < sent_pkts || inj_pend != '0) && n < 20000) begin step(100, 1'b0); n++; end
    repeat (20) step(100, 1'b0);
  endtask

  initial begin
    in_flit = '0; in_valid = '0; out_ready = '0; inj_pend = '0; inj_vec = '0; last_sig = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // lone packet: latency of one cycle through an idle router
    new_packet(P_WEST, 2, 1);
    @(negedge clk);
    in_valid = '0; out_ready = '1;
    in_valid[P_WEST] = 1'b1; in_flit[P_WEST] = src_q[P_WEST][0];
    #4;
    checks++;
    if (!in_ready[P_WEST]) fail("idle router did not accept a head");
    @(negedge clk);
    void'(src_q[P_WEST].pop_front());
    in_valid = '0; out_ready = '0;
    #4;
    checks++;
    if (!(out_valid[P_EAST] && out_flit[P_EAST].ftype == FT_HEAD)) fail("head not at EAST output one cycle later");
    lone_checked = 1;
    drain();

    // phase 0
    for (int n = 0; n < PER_PHASE; n++)
      for (int p = 0; p < NPORTS; p++) new_packet(p, $urandom_range(2), $urandom_range(2));
    while (recv_pkts < sent_pkts) begin
      if (blocked_port < 0 && $urandom_range(199) == 0) begin blocked_port = $urandom_range(4); block_left = 60; end
      step(80, 1'b0);
    end
    drain();

    // phase 1: neighbours E and W congested, N and S free
    phase = 1;
    inj_pend[P_EAST] = 1'b1; inj_vec[P_EAST] = 8'h0a;
    inj_pend[P_WEST] = 1'b1; inj_vec[P_WEST] = 8'h04;
    drain();
    for (int n = 0; n < PER_PHASE; n++)
      for (int p = 0; p < NPORTS; p++) new_packet(p, $urandom_range(2), $urandom_range(2));
    while (recv_pkts < sent_pkts) begin
      if (blocked_port < 0 && $urandom_range(199) == 0) begin
        blocked_port = ($urandom_range(1) == 0) ? P_LOCAL : P_NORTH; block_left = 60;
      end
      step(80, 1'b0);
    end
    drain();

    // phase 2: random signaling while traffic flows
    phase = 2;
    for (int n = 0; n < PER_PHASE; n++)
      for (int p = 0; p < NPORTS; p++) new_packet(p, $urandom_range(2), $urandom_range(2));
    while (recv_pkts < sent_pkts) begin
      if (blocked_port < 0 && $urandom_range(199) == 0) begin blocked_port = $urandom_range(4); block_left = 60; end
      step(80, 1'b1);
    end
    drain();

    checks++;
    if (recv_pkts != sent_pkts) fail($sformatf("received %0d of %0d packets", recv_pkts, sent_pkts));
    for (int p = 1; p < NPORTS; p++) begin
      checks++;
      if (last_sig[p] != 0) fail($sformatf("last signaling flit on port %0d still reports full queues", p));
    end
    checks++;
    if (stalls == 0 || sig_flits == 0 || sig_full == 0 || y_first == 0) begin
      failures++;
      $display("FAIL coverage stalls=%0d sig=%0d sig_full=%0d y_first=%0d", stalls, sig_flits, sig_full, y_first);
    end
    $display("packets=%0d stalls=%0d sig_flits=%0d y_first=%0d", recv_pkts, stalls, sig_flits, y_first);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
