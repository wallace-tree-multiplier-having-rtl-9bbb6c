// wallace_bec_mult: 4x4 unsigned Wallace tree multiplier whose final adder
// is a carry select adder that uses a binary to excess-1 converter (BEC)
// in place of the second, carry-in-1 ripple adder.
//
// Data flow, all combinational:
//   partial_product_gen  a, b -> 16 AND terms pp[i][j] (weight i + j)
//   wallace_reduction    two half/full adder stages -> product bits 0..2
//                        and two 4-bit rows of weight 3..6
//   final_adder          group 1 (weights 3..4): 2-bit ripple carry adder
//                        group 2 (weights 5..6): 2-bit ripple adder for
//                        carry in 0, 3-bit BEC for carry in 1, multiplexer
//                        selected by group 1's carry
// p = a * b, ready one combinational delay after a and b change; there is
// no clock. The use of a BEC-based carry select group for the upper product
// bits follows the source design; the tree layout and the group-1 width are
// this design's choices.
module wallace_bec_mult
  import wallace_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p
);
  pp_matrix_t       pp;
  logic [FINAL_LSB-1:0] p_low;
  row_t             row_x, row_y;
  logic [ROW_W:0]   row_sum;

  partial_product_gen #(.N(OPERAND_W)) u_ppg (
    .a (a),
    .b (b),
    .pp(pp)
  );

  wallace_reduction u_tree (
    .pp   (pp),
    .p_low(p_low),
    .row_x(row_x),
    .row_y(row_y)
  );

  final_adder #(.LOW_W(LOW_W), .HIGH_W(HIGH_W)) u_final (
    .x  (row_x),
    .y  (row_y),
    .sum(row_sum)
  );

  assign p = {row_sum, p_low};
endmodule
