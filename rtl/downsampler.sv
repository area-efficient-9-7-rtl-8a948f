// downsampler: decimation by two of a low-pass / high-pass output pair.
//
// A phase bit toggles on every valid input. Pairs that arrive while the
// phase is 0 (the 1st, 3rd, 5th ... valid pair after reset) are registered
// and presented with out_valid high for one cycle; the others are dropped.
// Outputs hold their last kept value between strobes.
//
//   in_valid, a, b   input pair (a: low-pass, b: high-pass) and its strobe
//   out_valid, qa, qb  kept pair, valid for the cycle after it was taken
//
// Only the block's name and role come from the published overview; the
// phase-bit structure and the choice of the even pairs are this design's.
//
// Timing: one register stage; a kept pair appears one clock after the edge
// that sampled it. Reset (synchronous, active low) sets the phase to 0 and
// clears the outputs.
module downsampler #(
  parameter int W = 13
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         out_valid,
  output logic [W-1:0] qa,
  output logic [W-1:0] qb
);
  logic phase;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      out_valid <= 1'b0;
      qa        <= '0;
      qb        <= '0;
    end else begin
      out_valid <= in_valid && !phase;
      if (in_valid) begin
        phase <= ~phase;
        if (!phase) begin
          qa <= a;
          qb <= b;
        end
      end
    end
  end
endmodule
