// tb_input_demux: self-checking test of the input demux.
// Sends random packets and interleaved signaling flits. The routing answer is
// made by the test from the head's destination byte (low 3 bits modulo 5),
// and queue-full flags are random. Checks that a head goes to its routed
// queue, that body and tail follow the head's queue even when the routing
// answer changes, that a flit waits (in_ready low, no write) only when its
// queue is full, and that signaling flits are always taken and never written.
module tb_input_demux;
  import voq_pkg::*;

  localparam int unsigned NQ = 5, QW = $clog2(NQ);

  logic clk = 1'b0, rst_n = 1'b0;
  flit_t in_flit;
  logic in_valid, in_ready;
  logic [COORD_W-1:0] dst_x, dst_y;
  logic [PORT_W-1:0] route_port;
  logic [NQ-1:0] voq_full;
  logic wr_en;
  logic [QW-1:0] wr_q;
  flit_t wr_flit;
  logic sig_valid;
  logic [DATA_W-1:0] sig_vec;
  logic in_packet;
  int checks = 0, failures = 0, stalls = 0, sigs = 0;

  input_demux dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int want);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: got %0d want %0d", what, got, want); end
  endtask

  // Present one flit until it is taken; pkt_q is the queue of the packet.
  task automatic send(input flit_t f, inout int pkt_q);
    int q;
    in_flit = f; in_valid = 1'b1;
    forever begin
      voq_full   = NQ'($urandom) & NQ'($urandom);
      route_port = PORT_W'($urandom_range(NQ - 1));
      if (f.ftype == FT_HEAD) route_port = PORT_W'(f.data[2:0] % NQ);
      #1;
      if (f.ftype == FT_SIG) begin
        check("sig ready", int'(in_ready), 1);
        check("sig no write", int'(wr_en), 0);
        check("sig_valid", int'(sig_valid), 1);
        check("sig_vec", int'(sig_vec), int'(f.data));
        sigs++;
      end else begin
        q = (f.ftype == FT_HEAD) ? int'(f.data[2:0]) % NQ : pkt_q;
        check("dst_x", int'(dst_x), int'(f.data[3:0]));
        check("wr_q", int'(wr_q), q);
        check("ready", int'(in_ready), int'(!voq_full[q]));
        check("wr_en", int'(wr_en), int'(!voq_full[q]));
        check("sig_valid low", int'(sig_valid), 0);
        if (wr_en) check("wr_flit", int'(wr_flit), int'(f));
        if (!in_ready) stalls++;
      end
      @(posedge clk);
      if (in_ready) begin
        if (f.ftype == FT_HEAD) pkt_q = int'(f.data[2:0]) % NQ;
        break;
      end
      @(negedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    int pq;
    flit_t f;
    in_flit = '0; in_valid = 1'b0; voq_full = '0; route_port = '0; pq = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int p = 0; p < 300; p++) begin
      int len = $urandom_range(2, 5);
      for (int k = 0; k < len; k++) begin
        if ($urandom_range(3) == 0) begin
          f.ftype = FT_SIG; f.data = DATA_W'($urandom);
          send(f, pq);
        end
        f.ftype = (k == 0) ? FT_HEAD : (k == len - 1) ? FT_TAIL : FT_BODY;
        f.data  = DATA_W'($urandom);
        send(f, pq);
        check("in_packet", int'(in_packet), int'(k != len - 1));
      end
    end
    checks++;
    if (stalls == 0 || sigs == 0) begin failures++; $display("FAIL stalls=%0d sigs=%0d", stalls, sigs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
