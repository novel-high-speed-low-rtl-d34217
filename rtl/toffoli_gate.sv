// toffoli_gate: 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
// Inputs (A, B, C), outputs (P, Q, R): P = A, Q = B, and R is C inverted when
// both A and B are 1, otherwise C, i.e. R = C xor (A and B). With C tied to 0
// the gate is a reversible AND, which is how the multipliers use it to form
// partial products and carries. Purely combinational, no clock.
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
  assign r = c ^ (a & b);
endmodule
