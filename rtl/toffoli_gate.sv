// Toffoli gate (controlled-controlled-NOT), a 3x3 reversible gate.
//
// Mapping: p = a, q = b, r = (a & b) ^ c. It is a bijection on its three
// bits. Purely combinational, no clock.
//
// In this design (the choice of gate is its own) a Toffoli gate with c = 0
// forms the AND that merges group propagate signals in the Kogge-Stone
// prefix tree.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
