// rev_mult_pkg: types and constants shared by the reversible 2x2 Vedic
// multiplier architectures and their testbenches.
//
// The multiplier takes two 2-bit unsigned operands A[1:0], B[1:0] and returns
// the 4-bit product VM[3:0]. Each architecture is a cascade of reversible
// gates; the gate outputs that feed neither another gate nor the product are
// "garbage" outputs and are brought out on a port so that every gate output
// of the reversible network stays observable. The garbage widths below are
// counted from the gate netlists of the three architectures.
package rev_mult_pkg;

  typedef logic [1:0] operand_t;   // A[1:0] or B[1:0]
  typedef logic [3:0] product_t;   // VM[3:0]

  // Garbage outputs per architecture, counted from the netlists.
  localparam int unsigned ARCH1_GARBAGE = 6;  // TG2.Q TG3.P TG5.P TG5.Q FG1.P FG2.P
  localparam int unsigned ARCH2_GARBAGE = 6;  // TG2.Q TG3.P TG5.P TG5.Q BVF.P BVF.R
  localparam int unsigned ARCH3_GARBAGE = 6;  // TG2.Q TG3.P TG4.P TG4.Q PG1.P PG2.P

endpackage
