// peres_gate: 3x3 reversible Peres gate.
//
// Inputs (A, B, C), outputs (P, Q, R): P = A, Q = A xor B and
// R = C xor (A and B). With C tied to 0, Q and R are the sum and carry of the
// one-bit addition A + B, so one Peres gate is a reversible half adder.
// Purely combinational, no clock.
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
  assign r = c ^ (a & b);
endmodule
