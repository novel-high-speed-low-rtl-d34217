// vedic2x2_arch2: reversible 2x2 Vedic (Urdhva-Tiryagbhyam) multiplier built
// from six Toffoli gates TG1-TG6 and one BVF double-XOR gate.
//
// The partial products and the carries are formed exactly as in the first
// architecture; the two Feynman gates that formed the sum bits are replaced
// by a single BVF gate that performs both XORs:
//   TG1 (A0, B0, 0)       -> A0, B0, PP0 = VM0
//   TG2 (A1, B0, 0)       -> A1, B0 (garbage), PP2 = A1 B0
//   TG3 (A0, B1, 0)       -> A0 (garbage), B1, PP1 = A0 B1
//   TG5 (A1, B1, 0)       -> garbage, garbage, PP3 = A1 B1
//   TG4 (PP2, PP1, 0)     -> PP2, PP1, C1 = PP2 PP1
//   TG6 (C1, PP3, 0)      -> C1, PP3, VM3 = C1 PP3
//   BVF (PP2, PP1, C1, PP3) -> garbage, VM1 = PP2 xor PP1,
//                              garbage, VM2 = C1 xor PP3
// The gate list, the four BVF inputs and the outputs taken for VM0-VM3 follow
// the published circuit. Counted from this netlist the design has six garbage
// outputs; the published comparison lists seven for it, which this netlist
// does not reproduce. Combinational, no clock.
//
// Ports: a, b operands; vm product; garbage the six gate outputs that drive
// nothing else, in the order listed in rev_mult_pkg.
module vedic2x2_arch2
  import rev_mult_pkg::*;
(
  input  operand_t                 a,
  input  operand_t                 b,
  output product_t                 vm,
  output logic [ARCH2_GARBAGE-1:0] garbage
);
  logic tg1_a0, tg1_b0, pp0;
  logic tg2_a1, pp2, tg3_b1, pp1, pp3;
  logic tg4_pp2, tg4_pp1, c1, tg6_c1, tg6_pp3;

  toffoli_gate u_tg1 (.a(a[0]),   .b(b[0]),   .c(1'b0), .p(tg1_a0),  .q(tg1_b0),     .r(pp0));
  toffoli_gate u_tg2 (.a(a[1]),   .b(tg1_b0), .c(1'b0), .p(tg2_a1),  .q(garbage[0]), .r(pp2));
  toffoli_gate u_tg3 (.a(tg1_a0), .b(b[1]),   .c(1'b0), .p(garbage[1]), .q(tg3_b1),  .r(pp1));
  toffoli_gate u_tg5 (.a(tg2_a1), .b(tg3_b1), .c(1'b0), .p(garbage[2]), .q(garbage[3]), .r(pp3));
  toffoli_gate u_tg4 (.a(pp2),    .b(pp1),    .c(1'b0), .p(tg4_pp2), .q(tg4_pp1),    .r(c1));
  toffoli_gate u_tg6 (.a(c1),     .b(pp3),    .c(1'b0), .p(tg6_c1),  .q(tg6_pp3),    .r(vm[3]));
  bvf_gate     u_bvf1 (.a(tg4_pp2), .b(tg4_pp1), .c(tg6_c1), .d(tg6_pp3),
                       .p(garbage[4]), .q(vm[1]), .r(garbage[5]), .s(vm[2]));

  assign vm[0] = pp0;
endmodule
