// tb_out_scheduler: self-checking test of one output port's scheduler.
// Five model queues receive packets flit by flit at random times (so a queue
// can run dry in the middle of a packet) and the downstream ready and the
// signaling request are random. Flit data encodes {input, packet, flit}.
// Checks: a pending signaling flit goes out first and carries sig_vec; data
// flits leave in queue order; the flits of one packet leave back to back with
// no flit of another input between them (wormhole lock, observed while the
// owner's queue is empty); only the selected queue is popped, and only on a
// transfer; all packets are delivered.
module tb_out_scheduler;
  import voq_pkg::*;

  localparam int unsigned NIN = 5, IW = $clog2(NIN), PKTS = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NIN-1:0] req, pop;
  flit_t [NIN-1:0] head;
  logic sig_pending, sig_sent;
  logic [DATA_W-1:0] sig_vec;
  flit_t out_flit;
  logic out_valid, out_ready;
  logic locked;
  logic [IW-1:0] owner;

  flit_t pend [NIN][$];
  flit_t avail [NIN][$];
  int checks = 0, failures = 0, delivered = 0, lock_waits = 0, sig_count = 0, contended = 0;
  int cur_in = -1;

  out_scheduler dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  initial begin
    int total = 0;
    for (int i = 0; i < NIN; i++)
      for (int p = 0; p < PKTS; p++) begin
        automatic int len = $urandom_range(2, 4);
        for (int k = 0; k < len; k++) begin
          automatic flit_t f;
          f.ftype = (k == 0) ? FT_HEAD : (k == len - 1) ? FT_TAIL : FT_BODY;
          f.data  = {3'(i), 3'(p), 2'(k)};
          pend[i].push_back(f);
          total++;
        end
      end
    req = '0; head = '0; sig_pending = 1'b0; sig_vec = '0; out_ready = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (delivered < total) begin
      @(negedge clk);
      for (int i = 0; i < NIN; i++)
        if (pend[i].size() > 0 && $urandom_range(3) != 0) avail[i].push_back(pend[i].pop_front());
      for (int i = 0; i < NIN; i++) begin
        req[i]  = (avail[i].size() > 0);
        head[i] = req[i] ? avail[i][0] : flit_t'(0);
      end
      sig_pending = ($urandom_range(9) == 0);
      sig_vec     = DATA_W'($urandom);
      out_ready   = ($urandom_range(3) != 0);
      if ($countones(req) > 1) contended++;
      #1;
      checks++;
      if (sig_pending) begin
        sig_count++;
        if (!out_valid || out_flit.ftype != FT_SIG || out_flit.data != sig_vec || pop != '0
            || sig_sent != out_ready)
          fail("signaling flit not sent first");
      end else begin
        if (sig_sent) fail("sig_sent without request");
        if (cur_in >= 0 && !req[cur_in]) begin
          lock_waits++;
          if (out_valid) fail($sformatf("flit of another input while packet of %0d is open", cur_in));
        end else if (cur_in >= 0) begin
          if (!out_valid || out_flit !== avail[cur_in][0]) fail("open packet not continued");
        end else if (req != '0 && !out_valid) fail("request not served");
        if (out_valid && out_ready) begin
          automatic int src = int'(out_flit.data[7:5]);
          if (pop != NIN'(1 << src)) fail($sformatf("pop=%b for flit of input %0d", pop, src));
          else if (out_flit !== avail[src][0]) fail("flit out of order");
          if (cur_in < 0 && out_flit.ftype != FT_HEAD) fail("packet does not start with HEAD");
          if (cur_in >= 0 && src != cur_in) fail("packets interleaved");
          cur_in = (out_flit.ftype == FT_TAIL) ? -1 : src;
        end else if (pop != '0) fail("pop without transfer");
      end
      @(posedge clk);
      for (int i = 0; i < NIN; i++) if (pop[i]) begin void'(avail[i].pop_front()); delivered++; end
    end
    checks++;
    if (lock_waits == 0 || sig_count == 0 || contended == 0) begin
      failures++;
      $display("FAIL coverage lock_waits=%0d sig=%0d contended=%0d", lock_waits, sig_count, contended);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
