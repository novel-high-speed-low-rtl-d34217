// vedic_mult_top: the three reversible 2x2 Vedic multiplier architectures side
// by side, all fed the same operands.
//
// Architecture 1 uses Toffoli and Feynman gates, architecture 2 Toffoli gates
// and one BVF gate, architecture 3 Toffoli and Peres gates (the cheapest).
// All three compute vm = a * b for 2-bit unsigned a and b; each product and
// each architecture's garbage outputs are brought out on ports of their own,
// so the three can be compared or any one of them used. Purely combinational:
// the products follow the operands after the gate propagation delay.
module vedic_mult_top
  import rev_mult_pkg::*;
(
  input  operand_t                 a,
  input  operand_t                 b,
  output product_t                 vm_arch1,
  output product_t                 vm_arch2,
  output product_t                 vm_arch3,
  output logic [ARCH1_GARBAGE-1:0] garbage_arch1,
  output logic [ARCH2_GARBAGE-1:0] garbage_arch2,
  output logic [ARCH3_GARBAGE-1:0] garbage_arch3
);
  vedic2x2_arch1 u_arch1 (.a(a), .b(b), .vm(vm_arch1), .garbage(garbage_arch1));
  vedic2x2_arch2 u_arch2 (.a(a), .b(b), .vm(vm_arch2), .garbage(garbage_arch2));
  vedic2x2_arch3 u_arch3 (.a(a), .b(b), .vm(vm_arch3), .garbage(garbage_arch3));
endmodule
