// tb_dwt_1d: runs one filter level at its default size (5-bit signed input
// carrying 0..15, 13-bit outputs) and a level-2 sized copy (11-bit signed
// input, 19-bit outputs). Inputs are random with a random valid strobe.
// A reference history in the testbench gives, for every kept sample,
//   low  = 77(x0+x8) + 34(x1+x7) - 10(x2+x6) - 2(x3+x5) + 3 x4
//   high =  6(x0+x6) -  4(x1+x5) - 38(x2+x4) + 72 x3      (xi = X(n-i))
// and the output must appear exactly one clock after the kept sample, with
// out_valid low on every other clock.
module tb_dwt_1d;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // ---- level-1 size --------------------------------------------------
  logic        v1 = 1'b0, ov1;
  logic [4:0]  x1 = '0;
  logic [12:0] yl1, yh1;
  dwt_1d dut1 (.clk(clk), .rst_n(rst_n), .in_valid(v1), .x_in(x1),
               .out_valid(ov1), .yl(yl1), .yh(yh1));

  // ---- level-2 size --------------------------------------------------
  logic        v2 = 1'b0, ov2;
  logic [10:0] x2 = '0;
  logic [18:0] yl2, yh2;
  dwt_1d #(.W_IN(11), .W_OUT(19)) dut2 (
    .clk(clk), .rst_n(rst_n), .in_valid(v2), .x_in(x2),
    .out_valid(ov2), .yl(yl2), .yh(yh2));

  function automatic int lpf(input int w [9]);
    return 77*(w[0]+w[8]) + 34*(w[1]+w[7]) - 10*(w[2]+w[6])
         - 2*(w[3]+w[5]) + 3*w[4];
  endfunction
  function automatic int hpf(input int w [9]);
    return 6*(w[0]+w[6]) - 4*(w[1]+w[5]) - 38*(w[2]+w[4]) + 72*w[3];
  endfunction

  int h1 [9], h2 [9];          // h[0] = X(n), h[i] = X(n-i)
  int n1 = 0, n2 = 0;          // valid samples seen
  logic e1v = 0, e2v = 0;
  int e1l = 0, e1h = 0, e2l = 0, e2h = 0;
  int kept1 = 0, kept2 = 0;

  initial begin
    foreach (h1[i]) h1[i] = 0;
    foreach (h2[i]) h2[i] = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      v1 = ($urandom % 4) != 0;
      x1 = {1'b0, 4'($urandom)};
      v2 = ($urandom % 2) != 0;
      x2 = 11'($urandom);
      if (t < 40) begin
        x2 = (t % 2 == 1) ? 11'h3FF : 11'h400;   // extremes, alternating
      end
      e1v = 1'b0;
      if (v1) begin
        for (int i = 8; i > 0; i--) h1[i] = h1[i-1];
        h1[0] = int'($signed(x1));
        if (n1 % 2 == 0) begin e1v = 1'b1; e1l = lpf(h1); e1h = hpf(h1); kept1++; end
        n1++;
      end
      e2v = 1'b0;
      if (v2) begin
        for (int i = 8; i > 0; i--) h2[i] = h2[i-1];
        h2[0] = int'($signed(x2));
        if (n2 % 2 == 0) begin e2v = 1'b1; e2l = lpf(h2); e2h = hpf(h2); kept2++; end
        n2++;
      end
      @(negedge clk);
      checks++;
      if (ov1 !== e1v) begin failures++; $display("FAIL t=%0d valid1", t); end
      if (e1v) begin
        checks++;
        if (int'($signed(yl1)) != e1l || int'($signed(yh1)) != e1h) begin
          failures++;
          $display("FAIL t=%0d L1 yl %0d/%0d yh %0d/%0d", t, $signed(yl1), e1l,
                   $signed(yh1), e1h);
        end
      end
      checks++;
      if (ov2 !== e2v) begin failures++; $display("FAIL t=%0d valid2", t); end
      if (e2v) begin
        checks++;
        if (int'($signed(yl2)) != e2l || int'($signed(yh2)) != e2h) begin
          failures++;
          $display("FAIL t=%0d L2 yl %0d/%0d yh %0d/%0d", t, $signed(yl2), e2l,
                   $signed(yh2), e2h);
        end
      end
    end
    $display("kept: %0d level-1 size, %0d level-2 size", kept1, kept2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
