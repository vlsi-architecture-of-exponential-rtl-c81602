// Shared sizes and constants of the exponential unit.
//
// The iterative core works on 25-bit fixed-point words in 2.23 format
// (2 integer bits, 23 fraction bits) and runs 25 iterations. The
// extended-range wrapper takes a 24-bit signed input in 8.16 format and
// gives a 24-bit unsigned result in 8.16 format. The two scaling constants
// 1/ln2 (18 bits, 2.16) and ln2 (19 bits, 0.19) are the widths drawn in the
// extended-range block diagram; their rounded values are this design's.
package exp_pkg;

  // Iterative core (2.23 fixed point, 25 iterations)
  localparam int unsigned CORE_W     = 25;
  localparam int unsigned CORE_FRAC  = 23;
  localparam int unsigned NITER      = 25;

  // Extended-range wrapper (8.16 input and output)
  localparam int unsigned EXT_W      = 24;
  localparam int unsigned EXT_FRAC   = 16;
  localparam int unsigned INT_W      = 8;

  // Multiplier1: X * 1/ln2, constant in 2.16, product in 10.32 (42 bits)
  localparam int unsigned INV_LN2_W  = 18;
  localparam logic [INV_LN2_W-1:0] INV_LN2 = 18'd94548;   // round(2^16 / ln 2)
  localparam int unsigned MULT1_W    = EXT_W + INV_LN2_W;  // 42
  localparam int unsigned MULT1_FRAC = EXT_FRAC + 16;      // 32

  // Multiplier2: f * ln2, constant in 0.19, product in 0.35 (35 bits)
  localparam int unsigned LN2_W      = 19;
  localparam logic [LN2_W-1:0] LN2   = 19'd363409;         // round(2^19 * ln 2)
  localparam int unsigned MULT2_W    = EXT_FRAC + LN2_W;   // 35

  // Fraction_part register: e^(f ln2) kept in 1.15 format (16 bits)
  localparam int unsigned FRACP_W    = 16;

endpackage
