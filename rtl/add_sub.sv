// Add/subtract unit of the MAC: y = a + b or y = a - b (modulo 2^W).
//
// Subtraction is two's complement: every bit of b passes through a Feynman
// gate whose control is the subtract select, which inverts b, and the same
// select is the carry in of a W-bit Kogge-Stone adder (ksa_adder).
// Interface: a (accumulator value), b (product), op (OP_ADD / OP_SUB) in;
// y out. Purely combinational.
//
// The add/subtract function is the one the MAC's adder stage names; the
// inversion-plus-carry-in form and the use of Feynman gates for the
// inversion are this design's choice.
module add_sub
  import mac_pkg::*;
#(
  parameter int unsigned W = 2 * MAC_N
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  op_e          op,
  output logic [W-1:0] y
);
  logic          sub;
  logic [W-1:0]  b_eff;
  logic [W-1:0]  unused_sub_copy;
  logic          unused_cout;

  assign sub = (op == OP_SUB);

  for (genvar i = 0; i < W; i++) begin : g_inv
    feynman_gate u_inv (.a(sub), .b(b[i]), .p(unused_sub_copy[i]), .q(b_eff[i]));
  end

  ksa_adder #(.W(W)) u_ksa (
    .a(a), .b(b_eff), .cin(sub), .sum(y), .cout(unused_cout)
  );
endmodule
