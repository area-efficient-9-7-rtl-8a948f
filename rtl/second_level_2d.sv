// second_level_2d: two-level 9/7 wavelet decomposition of a 4-bit stream.
//
// Level 1 (dwt_1d) filters the unsigned 4-bit input e1 (0..15) into a
// low-pass and a high-pass band, each decimated by two. The sel input picks
// which level-1 band is decomposed again: sel = 0 the low-pass band, sel = 1
// the high-pass band. The chosen 13-bit band is divided by 4 (arithmetic
// shift right by LVL_SHIFT = 2, rounding towards minus infinity) so that the
// level-2 results fit the 19-bit outputs; level 2 (a second dwt_1d) filters
// it into yl1 (low-pass) and yh1 (high-pass), again decimated by two. With
// sel = 0 the outputs are the low-low and low-high bands, with sel = 1 the
// high-low and high-high bands.
//
// Interface: one input sample per clock, no stall. clk, active-low
// synchronous reset rst_n, sel sampled on each level-1 output strobe.
// y_valid is high for one cycle every fourth clock, when yl1 / yh1 carry a
// new level-2 pair; they hold their value in between.
//
// Timing: the level-1 pair of sample n (n = 0, 2, 4, ... counted from the
// first clock after reset) is registered at the edge after the sample; the
// level-2 pair built from level-1 outputs m = 0, 2, 4, ... appears one clock
// after that level-1 output, i.e. yl1/yh1 for samples up to n = 4q are valid
// two clocks after sample 4q was applied.
//
// Widths: 4-bit input, 13-bit level-1 results, 11-bit level-2 input, 19-bit
// level-2 results; none of these can overflow for any input sequence.
//
// The port names, the 4-bit input and the 19-bit outputs follow the
// published design. The meaning given to sel, the 13-bit level-1 word, the
// divide-by-4 between the levels, rst_n and y_valid are this design's own.
module second_level_2d
  import dwt_pkg::*;
#(
  parameter int W_E      = 4,
  parameter int W_L1     = 13,
  parameter int LVL_SHIFT = 2,
  parameter int W_Y      = 19
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           sel,
  input  logic [W_E-1:0] e1,
  output logic [W_Y-1:0] yh1,
  output logic [W_Y-1:0] yl1,
  output logic           y_valid
);
  localparam int W_L2 = W_L1 - LVL_SHIFT;

  logic            l1_valid;
  logic [W_L1-1:0] l1_l, l1_h, l1_sel;
  logic [W_L2-1:0] l2_in;

  // level 1: unsigned sample made signed by a zero sign bit
  dwt_1d #(.W_IN(W_E + 1), .W_OUT(W_L1)) u_lvl1 (
    .clk(clk), .rst_n(rst_n), .in_valid(1'b1), .x_in({1'b0, e1}),
    .out_valid(l1_valid), .yl(l1_l), .yh(l1_h)
  );

  assign l1_sel = sel ? l1_h : l1_l;
  assign l2_in  = W_L2'($signed(l1_sel) >>> LVL_SHIFT);

  // level 2: advances only on level-1 output strobes
  dwt_1d #(.W_IN(W_L2), .W_OUT(W_Y)) u_lvl2 (
    .clk(clk), .rst_n(rst_n), .in_valid(l1_valid), .x_in(l2_in),
    .out_valid(y_valid), .yl(yl1), .yh(yh1)
  );
endmodule
