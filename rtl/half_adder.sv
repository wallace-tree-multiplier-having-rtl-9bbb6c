// half_adder: one-bit half adder, the 2:2 counter of the Wallace tree.
// s = a ^ b, c = a & b. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
