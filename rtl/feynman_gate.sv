// Feynman gate (controlled-NOT), a 2x2 reversible gate.
//
// Mapping: p = a, q = a ^ b. The mapping is a bijection on its two bits, so
// no information is lost; p is the pass-through (garbage) output when only
// the XOR is wanted. Purely combinational, no clock.
//
// The MAC's adders are built from reversible gates; which gates to use is
// this design's choice. The Feynman gate supplies every plain XOR: the sum
// bits of the Kogge-Stone adder and the operand inversion for subtraction.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
