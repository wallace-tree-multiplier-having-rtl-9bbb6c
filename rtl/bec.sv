// bec: binary to excess-1 converter, x = b + 1 (mod 2^WIDTH), built without
// an adder. Bit 0 is inverted; every higher bit is flipped when all bits
// below it are 1: x[i] = b[i] ^ (b[0] & ... & b[i-1]). The AND terms form a
// prefix chain. Purely combinational.
// WIDTH defaults to 3: two sum bits plus the carry out of a 2-bit group.
module bec #(
  parameter int unsigned WIDTH = 3
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x
);
  // all_ones[i] = &b[i-1:0]; all_ones[0] = 1.
  logic [WIDTH-1:0] all_ones;

  assign all_ones[0] = 1'b1;
  for (genvar i = 1; i < WIDTH; i++) begin : g_chain
    assign all_ones[i] = all_ones[i-1] & b[i-1];
  end

  assign x = b ^ all_ones;
endmodule
