// mcsla: modified square-root carry select adder.
//
// The sum is split into groups whose sizes grow towards the most
// significant end (for 16 bits: 2 | 2, 3, 4, 5). The lowest 2-bit group is a
// ripple carry adder fed by cin. Every higher group holds two ripple carry
// adders that work in parallel, one assuming a carry in of 0 and one of 1;
// when the real carry from the group below arrives a multiplexer picks the
// matching sum and carry. The carry therefore passes each group through one
// multiplexer instead of rippling through every bit. "Modified" refers to
// the ripple adders being built from modified-XOR cells (mxor_fa).
//
// The group sizes are the published square-root CSLA table. WIDTH must be
// one of the tabulated sizes 4, 8, 16, 32 or 64; narrower
// values are added at the next tabulated width by the caller (see
// dwt_pkg::csla_fit). Purely combinational.
//
//   a, b  WIDTH-bit operands   cin   carry in
//   s     WIDTH-bit sum        cout  carry out
module mcsla
  import dwt_pkg::*;
#(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  localparam int NG = csla_num_groups(WIDTH);

  // carry into each group, carry out of the last one
  logic [NG:0] gc;

  assign gc[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int LSB = csla_group_lsb(WIDTH, g);
    localparam int SZ  = csla_group_size(WIDTH, g);

    if (g == 0) begin : g_rca
      rca #(.W(SZ)) u_rca (
        .a(a[LSB +: SZ]), .b(b[LSB +: SZ]), .cin(gc[0]),
        .s(s[LSB +: SZ]), .cout(gc[1])
      );
    end else begin : g_sel
      logic [SZ-1:0] s0, s1;
      logic          c0, c1;

      rca #(.W(SZ)) u_rca0 (
        .a(a[LSB +: SZ]), .b(b[LSB +: SZ]), .cin(1'b0), .s(s0), .cout(c0)
      );
      rca #(.W(SZ)) u_rca1 (
        .a(a[LSB +: SZ]), .b(b[LSB +: SZ]), .cin(1'b1), .s(s1), .cout(c1)
      );

      assign s[LSB +: SZ] = gc[g] ? s1 : s0;
      assign gc[g+1]      = gc[g] ? c1 : c0;
    end
  end

  assign cout = gc[NG];

  initial begin
    assert (NG > 0 && csla_group_lsb(WIDTH, NG) == WIDTH)
      else $error("mcsla: WIDTH %0d is not a tabulated CSLA size", WIDTH);
  end
endmodule
