// wallace_pkg: sizes and types shared by the 4x4 Wallace tree multiplier
// with a BEC-based carry select final adder.
//
// The multiplier works on 4-bit unsigned operands, the size of the design
// this RTL follows. The Wallace tree leaves product bits 0..2 final and
// hands two rows of weight 3..6 to the final adder. That adder is split
// into a 2-bit ripple carry group (group 1, weights 3..4) and a 2-bit carry
// select group with a 3-bit binary to excess-1 converter (group 2, weights
// 5..6). The 2-bit group-2 width follows the source design; the 2-bit
// group-1 width is what remains of the 4-bit row and is this design's
// reading of it.
package wallace_pkg;

  localparam int unsigned OPERAND_W = 4;
  localparam int unsigned PRODUCT_W = 2 * OPERAND_W;

  // Weight of the lowest bit handled by the final two-row adder.
  localparam int unsigned FINAL_LSB = 3;
  // Final adder groups: ripple carry (low) and carry select with BEC (high).
  localparam int unsigned LOW_W  = 2;
  localparam int unsigned HIGH_W = 2;
  localparam int unsigned ROW_W  = LOW_W + HIGH_W;

  typedef logic [OPERAND_W-1:0] operand_t;
  typedef logic [PRODUCT_W-1:0] product_t;
  // pp[i][j] = a[j] & b[i], weight i + j.
  typedef logic [OPERAND_W-1:0][OPERAND_W-1:0] pp_matrix_t;
  typedef logic [ROW_W-1:0] row_t;

endpackage
