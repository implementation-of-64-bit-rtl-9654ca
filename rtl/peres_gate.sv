// Peres gate, a 3x3 reversible gate.
//
// Mapping: p = a, q = a ^ b, r = (a & b) ^ c. It is a bijection on its three
// bits. Purely combinational, no clock.
//
// Use in this design (the choice of gate is this design's own):
//  * with c = 0 it is a half adder, q = propagate and r = generate, which is
//    the bit-level generate/propagate stage of the Kogge-Stone adder;
//  * as the prefix "generate" merge G = Gh | (Ph & Gl): generate and
//    propagate (taken as XOR) of one group are never both 1, so the OR may be
//    written as the XOR r = (Ph & Gl) ^ Gh.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
