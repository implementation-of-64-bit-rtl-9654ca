// Product register of the MAC: holds the multiplier output for one clock so
// that the multiplier and the add/accumulate loop form two pipeline stages.
//
// On every rising clock edge the control word (valid, clear, add/subtract)
// is taken from the inputs; the product is loaded only when the incoming
// control is valid, otherwise it keeps its value. An asynchronous active-low
// reset clears the control word and the product.
// Interface: clk, rst_n; d_ctrl, d_prod in; q_ctrl, q_prod out (registered).
//
// The register itself is part of the MAC's structure; the control word that
// travels with the product and the reset style are this design's choice.
module product_reg
  import mac_pkg::*;
#(
  parameter int unsigned W = 2 * MAC_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mac_ctrl_t    d_ctrl,
  input  logic [W-1:0] d_prod,
  output mac_ctrl_t    q_ctrl,
  output logic [W-1:0] q_prod
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_ctrl <= '{valid: 1'b0, clr: 1'b0, op: OP_ADD};
      q_prod <= '0;
    end else begin
      q_ctrl <= d_ctrl;
      if (d_ctrl.valid) q_prod <= d_prod;
    end
  end
endmodule
