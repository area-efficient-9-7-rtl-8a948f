// rca: ripple carry adder of modified-XOR full adders.
//
// W full adders (mxor_fa) are chained through their carries. It is the
// building block of the carry select adder: the least significant group of
// the MCSLA and both candidate sums of every carry-select group are rcas.
// Purely combinational; the delay grows linearly with W.
//
//   a, b  W-bit operands (default 2, the ripple group of the MCSLA)   cin   carry in
//   s     W-bit sum          cout  carry out
module rca #(
  parameter int W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    mxor_fa u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end

  assign cout = c[W];
endmodule
