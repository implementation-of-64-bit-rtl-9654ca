// Accumulator register of the MAC: stores the running sum X of
// X <- X +/- Y*Z and feeds it back to the add/subtract unit.
//
// On a rising clock edge with en = 1 it loads d, otherwise it holds.
// q_valid is 1 in the cycle after a load, flagging a freshly updated q.
// An asynchronous active-low reset clears the sum to zero.
// Interface: clk, rst_n, en, d in; q, q_valid out (registered).
//
// The feedback register follows the MAC's structure; the enable, the
// update flag and the reset style are this design's choice.
module accumulator #(
  parameter int unsigned W = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         q_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q       <= '0;
      q_valid <= 1'b0;
    end else begin
      q_valid <= en;
      if (en) q <= d;
    end
  end
endmodule
