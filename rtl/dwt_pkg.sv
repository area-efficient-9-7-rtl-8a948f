// dwt_pkg: constants and constant functions shared by the 9/7 DWT datapath.
//
// Holds the filter coefficients used by the multiplier-less MDA filters and
// the group layout of the square-root carry select adder (MCSLA).
//
// Low-pass coefficients: the design's low-pass filter is the 9-tap 9/7
// analysis filter with its coefficients scaled by 128 and rounded to 8-bit
// two's complement, 77, 34, -10, -2, 3. They multiply the pre-added tap
// pairs u1..u5 in that order, u1 = X(n)+X(n-8) ... u5 = X(n-4), exactly as
// the coefficient vector is written for this architecture.
//
// High-pass coefficients: the 7-tap 9/7 analysis high-pass filter
// (1.115087, -0.591272, -0.057544, 0.091272 from the centre outwards) scaled
// by 64 so that it fits the same 8-bit MDA word, giving 72, -38, -4, 6. The
// centre value is rounded up from 71.4 so that the filter has exactly zero
// gain at DC. They multiply r1..r4 with r1 = X(n)+X(n-6) the outer pair and
// r4 = X(n-3) the centre tap. This scaling is a choice of this design.
//
// MCSLA layout: the first 2 bits are a ripple carry adder, the remaining
// bits are carry-select groups of the sizes listed per adder width
// (4, 8, 16, 32 and 64 bits).
package dwt_pkg;

  localparam int COEF_W = 8;                // coefficient word (bit planes)
  localparam int N_LPS  = 5;                // pre-added low-pass inputs u1..u5
  localparam int N_HPS  = 4;                // pre-added high-pass inputs r1..r4
  localparam int N_TAPS = 8;                // shift register depth X(n-1)..X(n-8)

  // Coefficient vectors, input j in bits [j*COEF_W +: COEF_W].
  localparam logic [N_LPS*COEF_W-1:0] LPS_COEFS =
      {8'sd3, -8'sd2, -8'sd10, 8'sd34, 8'sd77};   // u5 .. u1
  localparam logic [N_HPS*COEF_W-1:0] HPS_COEFS =
      {8'sd72, -8'sd38, -8'sd4, 8'sd6};           // r4 .. r1

  // Number of groups (RCA group included) of a square-root CSLA.
  function automatic int csla_num_groups(input int width);
    case (width)
      4:       return 2;
      8:       return 3;
      16:      return 5;
      32:      return 7;
      64:      return 11;
      default: return 0;
    endcase
  endfunction

  // Size in bits of group g (g = 0 is the ripple carry group).
  function automatic int csla_group_size(input int width, input int g);
    int sizes [11];
    case (width)
      4:       sizes = '{2, 2, 0, 0, 0, 0, 0, 0, 0, 0, 0};
      8:       sizes = '{2, 2, 4, 0, 0, 0, 0, 0, 0, 0, 0};
      16:      sizes = '{2, 2, 3, 4, 5, 0, 0, 0, 0, 0, 0};
      32:      sizes = '{2, 2, 3, 4, 6, 7, 8, 0, 0, 0, 0};
      64:      sizes = '{2, 2, 3, 4, 5, 6, 7, 8, 8, 9, 10};
      default: sizes = '{default: 0};
    endcase
    return sizes[g];
  endfunction

  // Least significant bit of group g.
  function automatic int csla_group_lsb(input int width, input int g);
    int lsb = 0;
    for (int i = 0; i < g; i++) lsb += csla_group_size(width, i);
    return lsb;
  endfunction

  // Smallest MCSLA width that holds a value of the given number of bits.
  function automatic int csla_fit(input int bits);
    if (bits <= 4)  return 4;
    if (bits <= 8)  return 8;
    if (bits <= 16) return 16;
    if (bits <= 32) return 32;
    return 64;
  endfunction

endpackage
