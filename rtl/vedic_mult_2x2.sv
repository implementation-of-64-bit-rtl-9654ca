// 2 x 2 bit Urdhva-Tiryakbhyam ("vertically and crosswise") multiplier.
//
// The leaf of the recursive Vedic multiplier. The three steps of the sutra
// on two bits:
//   vertical  (LSBs):   s0 = a0 b0
//   crosswise:          s1 = a1 b0 + a0 b1   (half adder, carry c1)
//   vertical  (MSBs):   s2 = a1 b1 + c1      (half adder, carry into s3)
// Product p = {s3, s2, s1, s0}. Purely combinational, no clock.
//
// The recursion floor of two bits and its half-adder form are this design's
// choice; the sutra itself is the one the multiplier is built on.
module vedic_mult_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic pp00, pp01, pp10, pp11;   // partial products a_i b_j
  logic c1;

  always_comb begin
    pp00 = a[0] & b[0];
    pp10 = a[1] & b[0];
    pp01 = a[0] & b[1];
    pp11 = a[1] & b[1];
    c1   = pp10 & pp01;
    p[0] = pp00;
    p[1] = pp10 ^ pp01;
    p[2] = pp11 ^ c1;
    p[3] = pp11 & c1;
  end
endmodule
