// rr_arbiter: round-robin arbiter for N requesters.
//
// grant is one-hot (or zero when nothing requests) and picks the first
// requester at or after the priority pointer, wrapping around. When advance
// is 1 at a rising edge, the pointer moves to the requester just after the
// current grant, so the winner becomes the lowest priority next time and every
// requester is served within N grants. The arbiter is combinational from req
// to grant; only the pointer is state. The document names a scheduler and an
// arbitration block without giving their policy; round robin is this design's
// choice.
module rr_arbiter #(
  parameter int unsigned N = 5,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          advance,
  output logic [N-1:0]  grant,
  output logic [IW-1:0] grant_idx
);

  logic [IW-1:0] ptr;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    for (int k = N - 1; k >= 0; k--) begin
      automatic int unsigned s = int'(ptr) + k;
      automatic logic [IW-1:0] i = IW'((s >= N) ? s - N : s);
      if (req[i]) begin
        grant     = '0;
        grant[i]  = 1'b1;
        grant_idx = i;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && grant != '0)
      ptr <= (int'(grant_idx) == N - 1) ? '0 : grant_idx + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant))
    else $error("rr_arbiter: grant not one-hot");

endmodule
