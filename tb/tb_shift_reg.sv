// tb_shift_reg: drives the 8-stage, 4-bit delay line first with 0000 and
// then 0011 (each stage must pick up 0011 one clock after the previous
// one), then with random samples and a random enable, comparing every stage
// with a reference history kept by the testbench.
module tb_shift_reg;
  localparam int W = 4, DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] x = '0;
  logic [DEPTH-1:0][W-1:0] y;
  logic [W-1:0] ref_y [DEPTH];
  int checks = 0, failures = 0;

  shift_reg dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y));

  always #5 clk = ~clk;

  task automatic step();
    @(posedge clk);
    if (en) begin
      for (int k = DEPTH - 1; k > 0; k--) ref_y[k] = ref_y[k-1];
      ref_y[0] = x;
    end
    @(negedge clk);
    for (int k = 0; k < DEPTH; k++) begin
      checks++;
      if (y[k] !== ref_y[k]) begin
        failures++;
        $display("FAIL stage %0d: %h expected %h", k + 1, y[k], ref_y[k]);
      end
    end
  endtask

  initial begin
    foreach (ref_y[k]) ref_y[k] = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    x = 4'b0000;
    repeat (4) step();
    x = 4'b0011;
    for (int t = 0; t < DEPTH + 2; t++) begin
      step();
      // stage k+1 holds 0011 after exactly k+1 clocks
      for (int k = 0; k < DEPTH; k++) begin
        checks++;
        if ((y[k] == 4'b0011) != (k <= t)) begin
          failures++;
          $display("FAIL timing stage %0d at clock %0d", k + 1, t);
        end
      end
    end
    for (int t = 0; t < 300; t++) begin
      x  = W'($urandom);
      en = ($urandom % 4) != 0;
      step();
    end
    // reset clears every stage
    rst_n = 1'b0;
    @(posedge clk);
    foreach (ref_y[k]) ref_y[k] = '0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < DEPTH; k++) begin
      checks++;
      if (y[k] !== '0) begin failures++; $display("FAIL reset stage %0d", k + 1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
