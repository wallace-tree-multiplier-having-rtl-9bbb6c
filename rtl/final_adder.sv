// final_adder: the two-row adder that completes the Wallace tree product.
//
// The rows x and y (LOW_W + HIGH_W bits) are split in two groups. Group 1,
// the low LOW_W bits, is added by a ripple carry adder with carry in 0.
// Group 2, the high HIGH_W bits, is a carry select group whose carry-in-1
// case comes from a binary to excess-1 converter (csla_bec); the carry out
// of group 1 selects its result. sum carries the final carry out in its top
// bit. Purely combinational.
// HIGH_W = 2 follows the source design; LOW_W = 2 is this design's split of
// the 4-bit rows of a 4x4 multiplier.
module final_adder #(
  parameter int unsigned LOW_W  = 2,
  parameter int unsigned HIGH_W = 2
) (
  input  logic [LOW_W+HIGH_W-1:0] x,
  input  logic [LOW_W+HIGH_W-1:0] y,
  output logic [LOW_W+HIGH_W:0]   sum
);
  logic c_low;   // carry out of group 1, carry select of group 2

  rca #(.WIDTH(LOW_W)) u_group1 (
    .a (x[LOW_W-1:0]),
    .b (y[LOW_W-1:0]),
    .ci(1'b0),
    .s (sum[LOW_W-1:0]),
    .co(c_low)
  );

  csla_bec #(.WIDTH(HIGH_W)) u_group2 (
    .a (x[LOW_W+HIGH_W-1:LOW_W]),
    .b (y[LOW_W+HIGH_W-1:LOW_W]),
    .ci(c_low),
    .s (sum[LOW_W+HIGH_W-1:LOW_W]),
    .co(sum[LOW_W+HIGH_W])
  );
endmodule
