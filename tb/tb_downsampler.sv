// tb_downsampler: random pairs with a random valid strobe. Of the valid
// pairs only the 1st, 3rd, 5th ... may come out, one clock later, with
// out_valid high for exactly that cycle; the outputs must otherwise hold.
module tb_downsampler;
  localparam int W = 13;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [W-1:0] a = '0, b = '0, qa, qb;
  logic out_valid;
  int checks = 0, failures = 0, kept = 0, dropped = 0;
  int nvalid = 0;
  logic exp_valid = 1'b0;
  logic [W-1:0] exp_a = '0, exp_b = '0;

  downsampler #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .qa(qa), .qb(qb)
  );

  always #5 clk = ~clk;

  initial begin
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      in_valid = ($urandom % 3) != 0;
      a = W'($urandom);
      b = W'($urandom);
      exp_valid = 1'b0;
      if (in_valid) begin
        if (nvalid % 2 == 0) begin
          exp_valid = 1'b1; exp_a = a; exp_b = b; kept++;
        end else dropped++;
        nvalid++;
      end
      @(negedge clk);
      checks++;
      if (out_valid !== exp_valid || qa !== exp_a || qb !== exp_b) begin
        failures++;
        $display("FAIL t=%0d valid %b/%b a %h/%h b %h/%h", t, out_valid,
                 exp_valid, qa, exp_a, qb, exp_b);
      end
    end
    checks++;
    if (kept == 0 || dropped == 0) failures++;
    $display("kept=%0d dropped=%0d", kept, dropped);
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
