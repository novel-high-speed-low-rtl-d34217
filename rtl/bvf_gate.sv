// bvf_gate: 4x4 reversible BVF gate, a double XOR (two Feynman gates side by
// side in one cell).
//
// Inputs (A, B, C, D), outputs (P, Q, R, S): P = A, Q = A xor B, R = C and
// S = C xor D. The 2x2 multiplier of the second architecture uses Q and S as
// the two XOR sum bits VM[1] and VM[2]. The output equations are the standard
// definition of the BVF gate; the source design only calls it a reversible
// double XOR gate. Purely combinational, no clock.
module bvf_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = a ^ b;
  assign r = c;
  assign s = c ^ d;
endmodule
