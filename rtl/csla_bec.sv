// csla_bec: one carry select adder group in which the carry-in-1 adder is
// replaced by a binary to excess-1 converter (BEC).
//
// An rca computes {co0, s0} = a + b with carry in 0. A bec of WIDTH+1 bits
// turns that result into {co0, s0} + 1, which equals a + b + 1. A 2:1
// multiplexer, steered by the real carry in ci that arrives from the group
// below, passes one of the two to {co, s}. The adder and the BEC work while
// ci is still on its way, so ci only passes through the multiplexer.
// Purely combinational. WIDTH defaults to 2.
module csla_bec #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [WIDTH-1:0] s0;
  logic             co0;
  logic [WIDTH:0]   r1;   // carry-in-1 result {co, s}

  rca #(.WIDTH(WIDTH)) u_rca0 (
    .a (a),
    .b (b),
    .ci(1'b0),
    .s (s0),
    .co(co0)
  );

  bec #(.WIDTH(WIDTH + 1)) u_bec (
    .b({co0, s0}),
    .x(r1)
  );

  assign {co, s} = ci ? r1 : {co0, s0};
endmodule
