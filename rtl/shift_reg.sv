// shift_reg: serial-in, parallel-out delay line of the DWT filter window.
//
// DEPTH W-bit flip-flop stages (dff2) are chained: every clock edge with en
// high moves the input sample x into stage 1 and each stage into the next.
// The stage outputs are the delayed samples, y[0] = X(n-1) up to
// y[DEPTH-1] = X(n-DEPTH), which together with the undelayed X(n) form the
// nine-sample window of the 9/7 filters. The default of eight 4-bit stages
// matches the 4-bit input of the first decomposition level.
//
// Timing: a sample presented with en high appears on y[0] after the next
// rising edge and on y[k] after k+1 enabled edges. A synchronous active-low
// reset clears all stages (an assumption of this design, so that the filter
// starts from a zero-padded history).
module shift_reg #(
  parameter int W     = 4,
  parameter int DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic [W-1:0]             x,
  output logic [DEPTH-1:0][W-1:0]  y
);
  for (genvar k = 0; k < DEPTH; k++) begin : g_stage
    if (k == 0) begin : g_first
      dff2 #(.W(W)) f (.clk(clk), .rst_n(rst_n), .en(en), .d(x), .q(y[0]));
    end else begin : g_next
      dff2 #(.W(W)) f (.clk(clk), .rst_n(rst_n), .en(en), .d(y[k-1]), .q(y[k]));
    end
  end
endmodule
