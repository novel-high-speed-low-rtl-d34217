// vedic2x2_arch3: reversible 2x2 Vedic (Urdhva-Tiryagbhyam) multiplier built
// from four Toffoli gates TG1-TG4 and two Peres gates PG1, PG2. This is the
// cheapest of the three architectures (six gates, quantum cost 28).
//
// Toffoli gates form the four partial products; each Peres gate with its
// third input at 0 is a half adder (Q = sum, R = carry):
//   TG1 (A0, B0, 0)       -> A0, B0, PP0 = VM0
//   TG2 (A1, B0, 0)       -> A1, B0 (garbage), PP2 = A1 B0
//   TG3 (A0, B1, 0)       -> A0 (garbage), B1, PP1 = A0 B1
//   TG4 (A1, B1, 0)       -> garbage, garbage, PP3 = A1 B1
//   PG1 (PP2, PP1, 0)     -> garbage, VM1 = PP2 xor PP1, C1 = PP2 PP1
//   PG2 (C1, PP3, 0)      -> garbage, VM2 = C1 xor PP3, VM3 = C1 PP3
// The gate list and connections follow the published circuit. Which of C1 and
// PP3 enters PG2 first is this design's choice; both Peres outputs used are
// symmetric in A and B, so the product does not depend on it.
// Combinational, no clock.
//
// Ports: a, b operands; vm product; garbage the six gate outputs that drive
// nothing else, in the order listed in rev_mult_pkg.
module vedic2x2_arch3
  import rev_mult_pkg::*;
(
  input  operand_t                 a,
  input  operand_t                 b,
  output product_t                 vm,
  output logic [ARCH3_GARBAGE-1:0] garbage
);
  logic tg1_a0, tg1_b0, pp0;
  logic tg2_a1, pp2, tg3_b1, pp1, pp3;
  logic c1;

  toffoli_gate u_tg1 (.a(a[0]),   .b(b[0]),   .c(1'b0), .p(tg1_a0),     .q(tg1_b0),     .r(pp0));
  toffoli_gate u_tg2 (.a(a[1]),   .b(tg1_b0), .c(1'b0), .p(tg2_a1),     .q(garbage[0]), .r(pp2));
  toffoli_gate u_tg3 (.a(tg1_a0), .b(b[1]),   .c(1'b0), .p(garbage[1]), .q(tg3_b1),     .r(pp1));
  toffoli_gate u_tg4 (.a(tg2_a1), .b(tg3_b1), .c(1'b0), .p(garbage[2]), .q(garbage[3]), .r(pp3));
  peres_gate   u_pg1 (.a(pp2),    .b(pp1),    .c(1'b0), .p(garbage[4]), .q(vm[1]),      .r(c1));
  peres_gate   u_pg2 (.a(c1),     .b(pp3),    .c(1'b0), .p(garbage[5]), .q(vm[2]),      .r(vm[3]));

  assign vm[0] = pp0;
endmodule
