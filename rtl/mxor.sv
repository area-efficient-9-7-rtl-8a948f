// mxor: modified XOR gate, usable as a half adder.
//
// The exclusive OR is formed as (A AND B) inverted, ANDed with (A OR B):
// an AND and an OR in the first stage, an inverter on the AND output, and
// a final AND, four gates in all. Because the first-stage AND already
// computes A AND B, the same cell delivers the half-adder carry at no extra
// cost, so one mxor is a complete half adder. Purely combinational.
//
//   a, b  operand bits
//   s     a XOR b (half-adder sum)
//   c     a AND b (half-adder carry)
module mxor (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  logic and_ab, or_ab, nand_ab;

  assign and_ab  = a & b;
  assign or_ab   = a | b;
  assign nand_ab = ~and_ab;
  assign s       = nand_ab & or_ab;
  assign c       = and_ab;
endmodule
