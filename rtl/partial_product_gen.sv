// partial_product_gen: the AND array of an N x N unsigned multiplier.
// Row i of the output is the multiplicand gated by multiplier bit b[i]:
// pp[i][j] = a[j] & b[i], of weight i + j. Purely combinational.
// N defaults to 4, the operand width of the multiplier it serves.
module partial_product_gen #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        pp[i][j] = a[j] & b[i];
      end
    end
  end
endmodule
