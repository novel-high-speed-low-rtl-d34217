// vedic2x2_arch1: reversible 2x2 Vedic (Urdhva-Tiryagbhyam) multiplier built
// from six Toffoli gates TG1-TG6 and two Feynman gates FG1, FG2.
//
// Vertical-and-crosswise multiplication of A[1:0] by B[1:0]:
//   PP0 = A0 B0, PP2 = A1 B0, PP1 = A0 B1, PP3 = A1 B1
//   VM0 = PP0, {C1,VM1} = PP2 + PP1, {VM3,VM2} = PP3 + C1.
// Netlist (every Toffoli target input is the constant 0):
//   TG1 (A0, B0, 0)       -> A0, B0, PP0 = VM0
//   TG2 (A1, B0, 0)       -> A1, B0 (garbage), PP2
//   TG3 (A0, B1, 0)       -> A0 (garbage), B1, PP1
//   TG5 (A1, B1, 0)       -> garbage, garbage, PP3
//   TG4 (PP2, PP1, 0)     -> PP2, PP1, C1 = PP2 PP1
//   FG1 (PP2, PP1)        -> garbage, VM1 = PP2 xor PP1
//   TG6 (C1, PP3, 0)      -> C1, PP3, VM3 = C1 PP3
//   FG2 (C1, PP3)         -> garbage, VM2 = C1 xor PP3
// TG2 and TG3 take their A0/B0 copies from TG1's pass-through outputs and TG5
// takes A1 and B1 from those of TG2 and TG3, so every operand bit has exactly
// one load, as a reversible network requires (fan-out through gates only).
// The gate list and connections follow the published circuit; the order of
// the two pass-through operands at a gate input is this design's choice and
// does not change any product bit. Combinational, no clock; the product is
// valid one propagation delay (four gate levels) after the operands.
//
// Ports: a, b operands; vm product; garbage the six gate outputs that drive
// nothing else, in the order listed in rev_mult_pkg.
module vedic2x2_arch1
  import rev_mult_pkg::*;
(
  input  operand_t                 a,
  input  operand_t                 b,
  output product_t                 vm,
  output logic [ARCH1_GARBAGE-1:0] garbage
);
  // TG1
  logic tg1_a0, tg1_b0, pp0;
  // TG2, TG3, TG5
  logic tg2_a1, pp2, tg3_b1, pp1, pp3;
  // TG4, TG6 pass-throughs and carry
  logic tg4_pp2, tg4_pp1, c1, tg6_c1, tg6_pp3;

  toffoli_gate u_tg1 (.a(a[0]),   .b(b[0]),   .c(1'b0), .p(tg1_a0),  .q(tg1_b0),     .r(pp0));
  toffoli_gate u_tg2 (.a(a[1]),   .b(tg1_b0), .c(1'b0), .p(tg2_a1),  .q(garbage[0]), .r(pp2));
  toffoli_gate u_tg3 (.a(tg1_a0), .b(b[1]),   .c(1'b0), .p(garbage[1]), .q(tg3_b1),  .r(pp1));
  toffoli_gate u_tg5 (.a(tg2_a1), .b(tg3_b1), .c(1'b0), .p(garbage[2]), .q(garbage[3]), .r(pp3));
  toffoli_gate u_tg4 (.a(pp2),    .b(pp1),    .c(1'b0), .p(tg4_pp2), .q(tg4_pp1),    .r(c1));
  feynman_gate u_fg1 (.a(tg4_pp2), .b(tg4_pp1),          .p(garbage[4]), .q(vm[1]));
  toffoli_gate u_tg6 (.a(c1),     .b(pp3),    .c(1'b0), .p(tg6_c1),  .q(tg6_pp3),    .r(vm[3]));
  feynman_gate u_fg2 (.a(tg6_c1), .b(tg6_pp3),           .p(garbage[5]), .q(vm[2]));

  assign vm[0] = pp0;
endmodule
