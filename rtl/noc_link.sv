// noc_link: one direction of an inter-switch link.
//
// The link is FLIT_W data wires plus the flit-kind and valid wires, with a
// register stage at the receiving end, so a flit sent in one cycle arrives in the
// next: the one-cycle link latency of a short link. The ready wire runs back
// without a register; the sender only sends while ready is high, and the receiver
// raises ready only while it has two free buffer cells, which makes room for the
// flit still on the link. MAF test vectors (FK_LTEST) travel the same wires and
// register, one per cycle, regardless of ready.
//
// The one-cycle latency follows the design; the register stage and the ready rule
// are this design's choices.
module noc_link
  import noc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   tx_valid,
  input  flit_t  tx_flit,
  output logic   tx_ready,
  output logic   rx_valid,
  output flit_t  rx_flit,
  input  logic   rx_ready
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_valid <= 1'b0;
      rx_flit  <= '0;
    end else begin
      rx_valid <= tx_valid;
      rx_flit  <= tx_flit;
    end
  end

  assign tx_ready = rx_ready;

endmodule
