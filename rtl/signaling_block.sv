// signaling_block: congestion signaling between neighbouring routers.
//
// Two jobs, one per direction of each mesh link:
//  * Receive. Every signaling (SIG) flit that arrives on port p carries the
//    congestion state of the neighbour behind p: one bit per virtual output
//    queue of that neighbour's input port facing us, 1 = no free space. The
//    flit overwrites entry p of the internal table, which the routing blocks
//    read (nbr_table).
//  * Generate. For each port p it watches the full flags of this router's own
//    input port p. When they differ from the last state sent on p, tx_pending[p]
//    asks the scheduler of output p to send a SIG flit carrying tx_vec[p];
//    tx_sent[p] marks that it went out. So a flit is sent on every change of
//    state and never otherwise.
//
// Ports whose bit in SIG_PORTS is 0 (the local core port by default) neither
// send nor use signaling flits. Timing: table and "last sent" registers update
// at the rising edge; outputs are from registers or simple logic on the
// queue flags. The document gives the table, its update on every incoming
// signaling flit and the free-space meaning of congestion; the change-driven
// sending and the bit layout are this design's choices.
module signaling_block
  import voq_pkg::*;
#(
  parameter logic [NPORTS-1:0] SIG_PORTS = 5'b11110
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // received signaling flits, one source per input port
  input  logic [NPORTS-1:0]                rx_valid,
  input  logic [NPORTS-1:0][DATA_W-1:0]    rx_vec,
  // full flags of the local VOQs: [input port][queue]
  input  logic [NPORTS-1:0][NPORTS-1:0]    local_full,
  // signaling flits to send, one per output port
  output logic [NPORTS-1:0]                tx_pending,
  output logic [NPORTS-1:0][DATA_W-1:0]    tx_vec,
  input  logic [NPORTS-1:0]                tx_sent,
  // to the routing blocks
  output logic [NPORTS-1:0][DATA_W-1:0]    nbr_table
);

  logic [NPORTS-1:0][NPORTS-1:0] last_sent;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbr_table <= '0;
      last_sent <= '0;
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        if (SIG_PORTS[p] && rx_valid[p]) nbr_table[p] <= rx_vec[p];
        if (SIG_PORTS[p] && tx_sent[p])  last_sent[p] <= local_full[p];
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      tx_vec[p]     = DATA_W'(local_full[p]);
      tx_pending[p] = SIG_PORTS[p] && (local_full[p] != last_sent[p]);
    end
  end

endmodule
