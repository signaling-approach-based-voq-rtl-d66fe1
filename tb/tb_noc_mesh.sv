// tb_noc_mesh: end-to-end test of the mesh at its default size (3 x 3) with
// default parameters. The test is the core at every node: it injects packets
// {HEAD dst, id_hi, id_lo, payload..., TAIL} at the local inputs and checks at
// the local outputs that every packet arrives once, complete, in flit order,
// at the node named in its head.
//   1. A lone packet from (0,0) to (2,2) must reach the destination's local
//      output five cycles after the source accepted it (one cycle per router).
//   2. Uniform random traffic with randomly throttled cores.
//   3. Hot spot: the core at (2,0) stops taking flits for a while and (0,0)
//      floods it, so the EAST queue of (1,0) facing (0,0) fills. (0,0) also
//      sends to (2,2): the routers must signal the full queue and (0,0) must
//      send those packets north first.
// Every mechanism of the router is counted inside the routers and each must
// occur: input stall between routers, full queue, a write into one queue
// while another queue of the same input is full (no head-of-line blocking),
// a wormhole-locked output waiting for its owner, arbitration between several
// inputs, signaling flits sent and received, adaptive re-routing.
module tb_noc_mesh;
  import voq_pkg::*;

  localparam int unsigned COLS = 3, ROWS = 3, NODES = COLS * ROWS;
  localparam int unsigned PKTS_UNIFORM = 80;   // per node

  logic clk = 1'b0, rst_n = 1'b0;
  flit_t [NODES-1:0] local_in_flit, local_out_flit;
  logic  [NODES-1:0] local_in_valid, local_in_ready, local_out_valid, local_out_ready;

  noc_mesh dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++;
    $display("FAIL [%0d] %s", cycle, s);
  endtask

  // ---- mechanism counters, one set per router
  int ev_stall[NODES], ev_full[NODES], ev_bypass[NODES], ev_lockwait[NODES];
  int ev_contend[NODES], ev_sig_tx[NODES], ev_sig_rx[NODES], ev_reroute[NODES];

  for (genvar y = 0; y < ROWS; y++) begin : g_mon
    for (genvar x = 0; x < COLS; x++) begin : g_node
      localparam int N = y * COLS + x;
      always @(posedge clk) if (rst_n) begin
        for (int i = 0; i < NPORTS; i++) begin
          if (i != 0 && dut.g_row[y].g_col[x].u_router.in_valid[i]
              && !dut.g_row[y].g_col[x].u_router.in_ready[i]) ev_stall[N]++;
          if (dut.g_row[y].g_col[x].u_router.full[i] != '0) ev_full[N]++;
          if (dut.g_row[y].g_col[x].u_router.wr_en[i]
              && dut.g_row[y].g_col[x].u_router.full[i] != '0) ev_bypass[N]++;
          if (dut.g_row[y].g_col[x].u_router.wr_en[i]
              && dut.g_row[y].g_col[x].u_router.in_flit[i].ftype == FT_HEAD
              && dut.g_row[y].g_col[x].u_router.rerouted[i]) ev_reroute[N]++;
          if (dut.g_row[y].g_col[x].u_router.sig_valid[i]) ev_sig_rx[N]++;
          if (dut.g_row[y].g_col[x].u_router.tx_sent[i]) ev_sig_tx[N]++;
          if (dut.g_row[y].g_col[x].u_router.locked[i]
              && !dut.g_row[y].g_col[x].u_router.req[i][dut.g_row[y].g_col[x].u_router.owner[i]])
            ev_lockwait[N]++;
          if (!dut.g_row[y].g_col[x].u_router.locked[i]
              && $countones(dut.g_row[y].g_col[x].u_router.req[i]) > 1) ev_contend[N]++;
        end
      end
    end
  end

  // ---- sources and scoreboard
  function automatic logic [7:0] pay(input int id, input int k);
    return 8'((id * 7 + k * 13) & 8'hff);
  endfunction

  flit_t src_q [NODES][$];
  flit_t rx [NODES][$];
  int exp_dst [int], exp_len [int], got [int], head_cycle [int];
  int next_id = 0, sent_pkts = 0, recv_pkts = 0;
  int src_prob = 80, sink_prob = 75, blocked_node = -1;
  int lone_id = -1, lone_latency = -1;

  task automatic new_packet(input int src, input int dst);
    automatic int len = $urandom_range(4, 7);
    automatic int id = next_id++;
    automatic flit_t f;
    exp_dst[id] = dst; exp_len[id] = len;
    for (int k = 0; k < len; k++) begin
      f.ftype = (k == 0) ? FT_HEAD : (k == len - 1) ? FT_TAIL : FT_BODY;
      f.data  = (k == 0) ? {4'(dst / COLS), 4'(dst % COLS)}
              : (k == 1) ? 8'(id >> 8) : (k == 2) ? 8'(id) : pay(id, k);
      src_q[src].push_back(f);
    end
    sent_pkts++;
  endtask

  task automatic check_packet(input int n);
    automatic int id;
    checks++;
    if (rx[n].size() < 4) begin fail($sformatf("node %0d: short packet", n)); rx[n].delete(); return; end
    id = {rx[n][1].data, rx[n][2].data};
    if (!exp_len.exists(id)) begin fail($sformatf("node %0d: unknown id %0d", n, id)); rx[n].delete(); return; end
    if (got.exists(id)) fail($sformatf("packet %0d delivered twice", id));
    got[id] = 1;
    recv_pkts++;
    if (exp_dst[id] != n) fail($sformatf("packet %0d for node %0d delivered at %0d", id, exp_dst[id], n));
    if (rx[n][0].data != {4'(n / COLS), 4'(n % COLS)}) fail("head destination changed");
    if (rx[n].size() != exp_len[id]) fail($sformatf("packet %0d length %0d", id, rx[n].size()));
    for (int k = 3; k < rx[n].size(); k++)
      if (rx[n][k].data != pay(id, k) || rx[n][k].ftype != ((k == rx[n].size() - 1) ? FT_TAIL : FT_BODY))
        fail($sformatf("packet %0d flit %0d", id, k));
    rx[n].delete();
  endtask

  task automatic step();
    logic [NODES-1:0] take_in, take_out;
    @(negedge clk);
    for (int n = 0; n < NODES; n++) begin
      local_in_valid[n]  = (src_q[n].size() > 0) && ($urandom_range(99) < src_prob);
      local_in_flit[n]   = (src_q[n].size() > 0) ? src_q[n][0] : flit_t'(0);
      local_out_ready[n] = (n != blocked_node) && ($urandom_range(99) < sink_prob);
    end
    #4;
    take_in  = local_in_valid & local_in_ready;
    take_out = local_out_valid & local_out_ready;
    for (int n = 0; n < NODES; n++) begin
      if (take_in[n]) begin
        if (src_q[n][0].ftype == FT_HEAD && lone_id >= 0 && lone_latency < 0) head_cycle[lone_id] = cycle;
        void'(src_q[n].pop_front());
      end
      if (take_out[n]) begin
        checks++;
        if (local_out_flit[n].ftype == FT_SIG) fail("signaling flit at a local output");
        if (local_out_flit[n].ftype == FT_HEAD && lone_id >= 0 && lone_latency < 0)
          lone_latency = cycle - head_cycle[lone_id];
        rx[n].push_back(local_out_flit[n]);
        if (local_out_flit[n].ftype == FT_TAIL) check_packet(n);
      end
    end
  endtask

  task automatic run_until_empty();
    while (recv_pkts < sent_pkts) step();
    repeat (30) step();
  endtask

  initial begin
    int tot_rx = 0, tot_tx = 0;
    local_in_flit = '0; local_in_valid = '0; local_out_ready = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. lone packet: (0,0) -> (2,2), four hops, five routers
    src_prob = 100; sink_prob = 100;
    lone_id = next_id;
    new_packet(0, 8);
    run_until_empty();
    checks++;
    if (lone_latency != 5) fail($sformatf("lone packet latency %0d cycles, expected 5", lone_latency));
    $display("lone packet latency: %0d cycles", lone_latency);
    lone_id = -1;

    // 2. uniform random traffic
    src_prob = 80; sink_prob = 75;
    for (int k = 0; k < PKTS_UNIFORM; k++)
      for (int n = 0; n < NODES; n++) new_packet(n, $urandom_range(NODES - 1));
    run_until_empty();

    // 3. hot spot at node 2 = (2,0)
    blocked_node = 2;
    for (int k = 0; k < 40; k++) begin
      new_packet(0, ($urandom_range(1) == 0) ? 2 : 8);
      new_packet(3, $urandom_range(NODES - 1));
      new_packet(1, 2);
    end
    repeat (600) step();
    blocked_node = -1;
    run_until_empty();

    checks++;
    if (recv_pkts != sent_pkts) fail($sformatf("received %0d of %0d", recv_pkts, sent_pkts));
    begin
      int s[8];
      string names[8] = '{"link stall", "full queue", "queue bypass", "wormhole wait",
                          "arbitration", "signal sent", "signal received", "adaptive reroute"};
      s = '{default: 0};
      for (int n = 0; n < NODES; n++) begin
        s[0] += ev_stall[n]; s[1] += ev_full[n]; s[2] += ev_bypass[n]; s[3] += ev_lockwait[n];
        s[4] += ev_contend[n]; s[5] += ev_sig_tx[n]; s[6] += ev_sig_rx[n]; s[7] += ev_reroute[n];
      end
      for (int k = 0; k < 8; k++) begin
        checks++;
        $display("%-17s %0d", names[k], s[k]);
        if (s[k] == 0) fail($sformatf("mechanism never happened: %s", names[k]));
      end
      tot_tx = s[5]; tot_rx = s[6];
    end
    // signaling flits sent towards a mesh edge are dropped; all others arrive
    checks++;
    if (tot_rx > tot_tx) fail("more signaling flits received than sent");
    $display("packets delivered: %0d", recv_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
