// feynman_gate: 2x2 reversible Feynman (controlled-NOT) gate.
//
// Inputs (A, B), outputs (P, Q): P = A and Q = A xor B. The multipliers use it
// as a reversible XOR that forms a sum bit while passing one operand through.
// Purely combinational, no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
