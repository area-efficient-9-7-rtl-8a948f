// dwt_1d: one decomposition level of the 9/7 discrete wavelet transform.
//
// The input stream X(n) enters an 8-stage shift register that provides
// X(n-1) .. X(n-8). Because both filters are symmetric, tap pairs that share
// a coefficient are added first (all additions use the MCSLA adder):
//
//   low-pass  m1 = X(n)+X(n-8)  m2 = X(n-1)+X(n-7)  m3 = X(n-2)+X(n-6)
//             m4 = X(n-3)+X(n-5)  m5 = X(n-4)
//   high-pass r1 = X(n)+X(n-6)  r2 = X(n-1)+X(n-5)  r3 = X(n-2)+X(n-4)
//             r4 = X(n-3)
//
// The five low-pass and four high-pass pre-sums go to two multiplier-less
// MDA units with the coefficient vectors LPS_COEFS and HPS_COEFS. The 9-tap
// low-pass window is centred on X(n-4), the 7-tap high-pass window on
// X(n-3), so after keeping every second output pair the low-pass band holds
// the even and the high-pass band the odd sample phase.
//
// Interface: one signed W_IN-bit sample per cycle with in_valid high. The
// filter outputs of every sample are computed; the downsampler keeps the
// pair of the 1st, 3rd, 5th ... sample after reset (X(n) index n = 0, 2, 4,
// ...) and presents it on yl / yh with out_valid high one clock after that
// sample was taken. The delay line starts from zeros after reset.
// Results are W_OUT-bit signed; W_OUT must hold the largest filter output
// for the input range.
//
// The tap pairing, the low-pass coefficients and their order follow the
// published architecture; the high-pass coefficients, the valid handshake
// and decimating after the filters (rather than splitting odd and even
// samples in front of them) are this design's choices.
module dwt_1d
  import dwt_pkg::*;
#(
  parameter int                     W_IN      = 5,
  parameter int                     W_OUT     = 13,
  parameter logic [N_LPS*COEF_W-1:0] LPS_COEF = LPS_COEFS,
  parameter logic [N_HPS*COEF_W-1:0] HPS_COEF = HPS_COEFS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [W_IN-1:0]  x_in,
  output logic             out_valid,
  output logic [W_OUT-1:0] yl,
  output logic [W_OUT-1:0] yh
);
  localparam int PW = W_IN + 1;          // width of a pre-added pair
  localparam int PA = csla_fit(PW);      // MCSLA width for the pre-adders

  // window: tap[i] = X(n-i)
  logic [N_TAPS-1:0][W_IN-1:0] dly;
  logic [N_TAPS:0][W_IN-1:0]   tap;

  shift_reg #(.W(W_IN), .DEPTH(N_TAPS)) u_sr (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .x(x_in), .y(dly)
  );

  assign tap[0] = x_in;
  for (genvar i = 1; i <= N_TAPS; i++) begin : g_tap
    assign tap[i] = dly[i-1];
  end

  // pre-adder: sum of two signed taps, sign-extended to the MCSLA width
  function automatic logic [PA-1:0] sx(input logic [W_IN-1:0] v);
    return PA'($signed(v));
  endfunction

  logic [N_LPS-1:0][PW-1:0] m;   // m[0] = m1 ... m[4] = m5
  logic [N_HPS-1:0][PW-1:0] r;   // r[0] = r1 ... r[3] = r4

  // low-pass pairs (k, 8-k), k = 0..3, and centre tap 4
  for (genvar k = 0; k < 4; k++) begin : g_lpre
    logic [PA-1:0] s;
    mcsla #(.WIDTH(PA)) u_add (
      .a(sx(tap[k])), .b(sx(tap[8-k])), .cin(1'b0), .s(s), .cout()
    );
    assign m[k] = s[PW-1:0];
  end
  assign m[4] = PW'($signed(tap[4]));

  // high-pass pairs (k, 6-k), k = 0..2, and centre tap 3
  for (genvar k = 0; k < 3; k++) begin : g_hpre
    logic [PA-1:0] s;
    mcsla #(.WIDTH(PA)) u_add (
      .a(sx(tap[k])), .b(sx(tap[6-k])), .cin(1'b0), .s(s), .cout()
    );
    assign r[k] = s[PW-1:0];
  end
  assign r[3] = PW'($signed(tap[3]));

  logic [W_OUT-1:0] lps, hps;

  mda #(.NTAP(N_LPS), .IN_W(PW), .CW(COEF_W), .OUT_W(W_OUT), .COEFS(LPS_COEF))
    u_mda_l (.u(m), .y(lps));

  mda #(.NTAP(N_HPS), .IN_W(PW), .CW(COEF_W), .OUT_W(W_OUT), .COEFS(HPS_COEF))
    u_mda_h (.u(r), .y(hps));

  downsampler #(.W(W_OUT)) u_ds (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(lps), .b(hps),
    .out_valid(out_valid), .qa(yl), .qb(yh)
  );
endmodule
