// Kogge-Stone adder: W-bit parallel-prefix adder with carry in and carry out.
//
// How it works, in the three stages of the classic Kogge-Stone structure:
//  1. Pre-processing: for every bit a Peres gate with its third input tied to
//     0 gives the propagate p_i = a_i ^ b_i and generate g_i = a_i & b_i.
//     The carry in is merged into bit 0 (G_0 = g_0 | p_0 & cin) so that the
//     prefix tree yields true carries.
//  2. Prefix tree: clog2(W) levels. At level k every bit i >= 2^k combines
//     its group (G,P) with the group 2^k places below:
//       G = G_hi | (P_hi & G_lo)   (Peres gate; G and P of a group are never
//                                   both 1, so the OR is an XOR)
//       P = P_hi & P_lo            (Toffoli gate with its third input at 0)
//     Bits below 2^k pass their group unchanged. After the last level G_i is
//     the carry out of bit i.
//  3. Post-processing: s_i = p_i ^ c_(i-1) (Feynman gate), c_(-1) = cin;
//     cout is the carry out of bit W-1.
// The logic depth is clog2(W) prefix levels plus two gate levels.
//
// Interface: a, b and cin in; sum and cout out. Purely combinational.
//
// The three stages and the prefix rule follow the adder's description; the
// reversible gates chosen to build each stage (Peres, Toffoli, Feynman) are
// this design's own choice, since no gate types are named for it.
module ksa_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned L = (W > 1) ? $clog2(W) : 1;

  // gl[k] / pl[k]: group generate / propagate after k prefix levels.
  logic [W-1:0] p_bit;
  logic [W-1:0] g_bit;
  logic [L:0][W-1:0] gl;
  logic [L:0][W-1:0] pl;
  logic [W:0]   carry;   // carry[i] = carry into bit i
  // Pass-through ("garbage") outputs of the reversible gates.
  logic [W-1:0] unused_a_copy;
  logic         unused_p0_copy;
  logic         unused_cin_xor;

  // Stage 1: bit generate / propagate.
  for (genvar i = 0; i < W; i++) begin : g_pre
    peres_gate u_gp (
      .a(a[i]), .b(b[i]), .c(1'b0),
      .p(unused_a_copy[i]), .q(p_bit[i]), .r(g_bit[i])
    );
  end

  // Carry in folded into bit 0's generate.
  peres_gate u_cin (
    .a(p_bit[0]), .b(cin), .c(g_bit[0]),
    .p(unused_p0_copy), .q(unused_cin_xor), .r(gl[0][0])
  );
  assign gl[0][W-1:1] = g_bit[W-1:1];
  assign pl[0]        = p_bit;

  // Stage 2: prefix tree.
  for (genvar k = 0; k < L; k++) begin : g_lvl
    localparam int unsigned D = 1 << k;
    for (genvar i = 0; i < W; i++) begin : g_bit_cell
      if (i >= D) begin : g_black
        logic unused_ph_a, unused_ph_b, unused_pl, unused_q;
        peres_gate u_g (
          .a(pl[k][i]), .b(gl[k][i-D]), .c(gl[k][i]),
          .p(unused_ph_a), .q(unused_q), .r(gl[k+1][i])
        );
        toffoli_gate u_p (
          .a(pl[k][i]), .b(pl[k][i-D]), .c(1'b0),
          .p(unused_ph_b), .q(unused_pl), .r(pl[k+1][i])
        );
      end else begin : g_pass
        assign gl[k+1][i] = gl[k][i];
        assign pl[k+1][i] = pl[k][i];
      end
    end
  end

  // Stage 3: sums.
  assign carry[0]   = cin;
  assign carry[W:1] = gl[L];
  for (genvar i = 0; i < W; i++) begin : g_sum
    logic unused_p_copy;
    feynman_gate u_s (
      .a(p_bit[i]), .b(carry[i]),
      .p(unused_p_copy), .q(sum[i])
    );
  end
  assign cout = carry[W];
endmodule
