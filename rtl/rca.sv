// rca: ripple carry adder of WIDTH full adders.
// {co, s} = a + b + ci; the carry ripples from bit 0 upward through a chain
// of full_adder cells. Purely combinational. WIDTH defaults to 2, the width
// of the ripple carry pieces in the multiplier's final adder.
module rca #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [WIDTH:0] c;

  assign c[0] = ci;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign co = c[WIDTH];
endmodule
