// wallace_reduction: two-stage Wallace tree for a 4x4 unsigned multiplier.
//
// Input pp[i][j] = a[j] & b[i] has weight i + j; the column heights are
// 1, 2, 3, 4, 3, 2, 1 for weights 0..6. Stage 1 compresses partial-product
// rows 0..2 with half adders at weights 1 and 4 and full adders at weights
// 2 and 3; row 3 and pp[2][3] pass through. Stage 2 compresses every column
// of height 2 or 3 (a half adder at weight 2, full adders at weights 3..5).
// Afterwards weights 0..2 hold one bit each, which are final product bits
// (p_low), and weights 3..6 hold two bits each, returned as the rows row_x
// and row_y (bit k has weight 3 + k) for the final carry-propagate adder.
// Purely combinational: two counter levels between input and output.
// Two outputs are plain wires from the input by construction: p_low[0] is
// pp[0][0] and row_x[3] is pp[3][3], the lone bits of weights 0 and 6.
// The tree itself is written for the 4-bit size; its exact cell placement
// is this design's own, following the usual Wallace rule of reducing every
// column as far as possible in each stage.
module wallace_reduction
  import wallace_pkg::*;
(
  input  pp_matrix_t pp,
  output logic [FINAL_LSB-1:0] p_low,
  output row_t       row_x,
  output row_t       row_y
);
  // Stage 1: sum s1_w / carry c1_w of the counter at weight w.
  logic s1_1, c1_1, s1_2, c1_2, s1_3, c1_3, s1_4, c1_4;
  // Stage 2.
  logic s2_3, c2_2, c2_3, s2_4, c2_4, s2_5, c2_5;

  // ---- stage 1: rows 0, 1, 2 ----
  half_adder u_s1_w1 (.a(pp[0][1]), .b(pp[1][0]),             .s(s1_1), .c (c1_1));
  full_adder u_s1_w2 (.a(pp[0][2]), .b(pp[1][1]), .ci(pp[2][0]), .s(s1_2), .co(c1_2));
  full_adder u_s1_w3 (.a(pp[0][3]), .b(pp[1][2]), .ci(pp[2][1]), .s(s1_3), .co(c1_3));
  half_adder u_s1_w4 (.a(pp[1][3]), .b(pp[2][2]),             .s(s1_4), .c (c1_4));

  // ---- stage 2 ----
  half_adder u_s2_w2 (.a(s1_2),     .b(c1_1),                 .s(p_low[2]), .c(c2_2));
  full_adder u_s2_w3 (.a(s1_3),     .b(c1_2), .ci(pp[3][0]),  .s(s2_3), .co(c2_3));
  full_adder u_s2_w4 (.a(s1_4),     .b(c1_3), .ci(pp[3][1]),  .s(s2_4), .co(c2_4));
  full_adder u_s2_w5 (.a(pp[2][3]), .b(c1_4), .ci(pp[3][2]),  .s(s2_5), .co(c2_5));

  assign p_low[0] = pp[0][0];
  assign p_low[1] = s1_1;

  assign row_x = {pp[3][3], s2_5, s2_4, s2_3};
  assign row_y = {c2_5,     c2_4, c2_3, c2_2};
endmodule
