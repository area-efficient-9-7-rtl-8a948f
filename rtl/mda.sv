// mda: multiplier-less inner product by modified distributed arithmetic.
//
// Computes y = sum_j c_j * u_j for NTAP signed inputs u_j and constant
// COEF_W-bit two's-complement coefficients c_j without any multiplier.
// The coefficients are read as a bit matrix: row k holds bit k of every
// coefficient. For the low-pass filter (77, 34, -10, -2, 3) the rows, from
// bit 0 up, select u1+u5, u2+u3+u4+u5, u1+u3+u4, u1+u4, u3+u4, u2+u3+u4,
// u1+u3+u4 and u3+u4. Each row is one sum of the inputs whose coefficient
// bit is set (a chain of MCSLA adders; a clear bit costs nothing). The rows
// are then combined with binary weights 2^k, the most significant row being
// subtracted because it is the two's-complement sign bit:
//
//   y = sum_{k<COEF_W-1} 2^k * row_k  -  2^(COEF_W-1) * row_{COEF_W-1}
//
// All additions and the subtraction (inverted operand, carry in 1) use
// mcsla. Rows whose bits are all zero are skipped at elaboration.
//
//   u   NTAP signed inputs of IN_W bits, u[j] multiplies coefficient j
//   y   OUT_W-bit signed result, the low bits of the exact sum. The caller
//       sizes OUT_W so that the exact result always fits.
//
// The bit-plane rows follow the published MDA formulation; combining them
// with an adder chain (no stored lookup table) is this design's choice.
// Purely combinational.
module mda
  import dwt_pkg::*;
#(
  parameter int                       NTAP   = N_LPS,
  parameter int                       IN_W   = 6,
  parameter int                       CW     = COEF_W,
  parameter int                       OUT_W  = 16,
  parameter logic [NTAP*CW-1:0]       COEFS  = LPS_COEFS
) (
  input  logic [NTAP-1:0][IN_W-1:0] u,
  output logic [OUT_W-1:0]          y
);
  // exact result width and the MCSLA width used for every addition
  localparam int EXACT_W = IN_W + $clog2(NTAP) + CW;
  localparam int AW      = csla_fit(EXACT_W > OUT_W ? EXACT_W : OUT_W);

  // true when some coefficient has bit k set
  function automatic bit row_used(input int k);
    bit any = 1'b0;
    for (int j = 0; j < NTAP; j++) any |= COEFS[j*CW + k];
    return any;
  endfunction

  logic [NTAP-1:0][AW-1:0] ux;       // sign-extended inputs
  logic [CW-1:0][AW-1:0]   row;      // bit-plane row sums
  logic [CW-1:0][AW-1:0]   acc;      // running weighted sum of rows 0..k-1

  for (genvar j = 0; j < NTAP; j++) begin : g_ext
    assign ux[j] = AW'($signed(u[j]));
  end

  // ---- row sums -------------------------------------------------------
  for (genvar k = 0; k < CW; k++) begin : g_row
    logic [NTAP:0][AW-1:0] part;
    assign part[0] = '0;
    for (genvar j = 0; j < NTAP; j++) begin : g_tap
      if (COEFS[j*CW + k]) begin : g_add
        mcsla #(.WIDTH(AW)) u_add (
          .a(part[j]), .b(ux[j]), .cin(1'b0), .s(part[j+1]), .cout()
        );
      end else begin : g_skip
        assign part[j+1] = part[j];
      end
    end
    assign row[k] = part[NTAP];
  end

  // ---- weighted combination of the rows -------------------------------
  assign acc[0] = '0;
  for (genvar k = 0; k < CW - 1; k++) begin : g_acc
    if (row_used(k)) begin : g_add
      mcsla #(.WIDTH(AW)) u_add (
        .a(acc[k]), .b(row[k] << k), .cin(1'b0), .s(acc[k+1]), .cout()
      );
    end else begin : g_skip
      assign acc[k+1] = acc[k];
    end
  end

  logic [AW-1:0] total;

  if (row_used(CW - 1)) begin : g_sign
    // subtract the sign row: acc + ~(row << (CW-1)) + 1
    mcsla #(.WIDTH(AW)) u_sub (
      .a(acc[CW-1]), .b(~(row[CW-1] << (CW - 1))), .cin(1'b1),
      .s(total), .cout()
    );
  end else begin : g_nosign
    assign total = acc[CW-1];
  end

  assign y = total[OUT_W-1:0];
endmodule
