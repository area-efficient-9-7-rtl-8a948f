// mxor_fa: full adder made from two modified-XOR half adders.
//
// The first mxor adds a and b, the second adds their sum and the carry in.
// The carry out is the OR of the two half-adder carries, so the full adder
// takes 4 + 4 + 1 = 9 gates. Purely combinational.
//
//   a, b, cin  operand bits and carry in
//   s, cout    sum and carry out
module mxor_fa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic s1, c1, c2;

  mxor u_ha0 (.a(a),  .b(b),   .s(s1), .c(c1));
  mxor u_ha1 (.a(s1), .b(cin), .s(s),  .c(c2));

  assign cout = c1 | c2;
endmodule
