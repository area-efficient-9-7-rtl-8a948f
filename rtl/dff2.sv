// dff2: W-bit D flip-flop with synchronous active-low reset and load enable.
//
// One stage of the delay line. On a rising clock edge q takes d when en is
// high and holds otherwise; rst_n low clears it to zero on the clock edge.
module dff2 #(
  parameter int W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end
endmodule
