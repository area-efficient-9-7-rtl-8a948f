// tb_second_level_2d: end-to-end test of the two-level 9/7 DWT at its
// default size (4-bit input, 19-bit outputs).
//
// Phase 1 repeats the classic constant-input run: e1 = 0000 after reset,
// then 0011 with sel = 0. Once both delay lines are full the outputs are
// constant: level 1 gives 3 * 201 = 603 (low) and 0 (high, zero DC gain),
// the level-2 input is 603 / 4 = 150, so yl1 = 150 * 201 = 30150, yh1 = 0.
// Phase 2 drives random samples and switches sel at random times; a
// cycle-level reference model (integer convolutions, its own histories and
// decimation phases) predicts every y_valid strobe and its yl1 / yh1.
// Phase 3 applies reset in mid-stream and checks that the outputs restart.
//
// Mechanisms counted (each must occur): level-1 samples dropped by the
// decimator, level-2 samples dropped, level-2 pairs with sel = 0 (low band
// re-split), with sel = 1 (high band re-split), sel switches, and
// mid-stream resets. The y_valid rate (one strobe per four input clocks)
// is checked as well.
module tb_second_level_2d;
  logic        clk = 1'b0, rst_n = 1'b0, sel = 1'b0;
  logic [3:0]  e1 = '0;
  logic [18:0] yh1, yl1;
  logic        y_valid;
  int checks = 0, failures = 0;

  second_level_2d dut (.clk(clk), .rst_n(rst_n), .sel(sel), .e1(e1),
                       .yh1(yh1), .yl1(yl1), .y_valid(y_valid));

  always #5 clk = ~clk;

  function automatic int lpf(input int w [9]);
    return 77*(w[0]+w[8]) + 34*(w[1]+w[7]) - 10*(w[2]+w[6])
         - 2*(w[3]+w[5]) + 3*w[4];
  endfunction
  function automatic int hpf(input int w [9]);
    return 6*(w[0]+w[6]) - 4*(w[1]+w[5]) - 38*(w[2]+w[4]) + 72*w[3];
  endfunction
  // arithmetic division by 4 rounding towards minus infinity
  function automatic int fdiv4(input int v);
    return (v >= 0) ? v / 4 : -((-v + 3) / 4);
  endfunction

  // ---- reference model state -------------------------------------------
  int  h1 [9], h2 [9];
  int  n1, n2;
  logic m1v; int m1l, m1h;     // level-1 output register
  logic m2v; int m2l, m2h;     // level-2 output register

  // counters of mechanisms
  int drop1 = 0, drop2 = 0, out_sel0 = 0, out_sel1 = 0, switches = 0;
  int resets = 0, strobes = 0, cycles = 0;

  task automatic model_reset();
    foreach (h1[i]) h1[i] = 0;
    foreach (h2[i]) h2[i] = 0;
    n1 = 0; n2 = 0;
    m1v = 0; m1l = 0; m1h = 0;
    m2v = 0; m2l = 0; m2h = 0;
  endtask

  // one clock edge of the reference, inputs as driven for this edge
  task automatic model_edge();
    logic nv2; int nl2, nh2;
    nv2 = 1'b0; nl2 = m2l; nh2 = m2h;
    if (m1v) begin
      for (int i = 8; i > 0; i--) h2[i] = h2[i-1];
      h2[0] = fdiv4(sel ? m1h : m1l);
      if (n2 % 2 == 0) begin
        nv2 = 1'b1; nl2 = lpf(h2); nh2 = hpf(h2);
        if (sel) out_sel1++; else out_sel0++;
      end else drop2++;
      n2++;
    end
    for (int i = 8; i > 0; i--) h1[i] = h1[i-1];
    h1[0] = int'(e1);
    if (n1 % 2 == 0) begin
      m1v = 1'b1; m1l = lpf(h1); m1h = hpf(h1);
    end else begin
      m1v = 1'b0; drop1++;
    end
    n1++;
    m2v = nv2; m2l = nl2; m2h = nh2;
  endtask

  task automatic compare(input string tag);
    checks++;
    if (y_valid !== m2v || int'($signed(yl1)) != m2l || int'($signed(yh1)) != m2h) begin
      failures++;
      $display("FAIL %s t=%0d valid %b/%b yl1 %0d/%0d yh1 %0d/%0d", tag, cycles,
               y_valid, m2v, $signed(yl1), m2l, $signed(yh1), m2h);
    end
  endtask

  task automatic clock(input string tag);
    model_edge();
    @(negedge clk);
    cycles++;
    if (y_valid) strobes++;
    compare(tag);
  endtask

  initial begin
    model_reset();
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;

    // ---- phase 1: 0000 then constant 0011, sel = 0 ----------------------
    sel = 1'b0;
    e1  = 4'b0000;
    repeat (5) clock("const0");
    e1 = 4'b0011;
    repeat (60) clock("const3");
    checks++;
    if (int'($signed(yl1)) != 30150 || int'($signed(yh1)) != 0) begin
      failures++;
      $display("FAIL steady state yl1=%0d yh1=%0d", $signed(yl1), $signed(yh1));
    end

    // ---- phase 2: random samples, random sel switches ----------------------
    begin
      automatic int s0 = strobes, c0 = cycles;
      for (int t = 0; t < 4000; t++) begin
        e1 = 4'($urandom);
        if (($urandom % 37) == 0) begin sel = ~sel; switches++; end
        clock("random");
      end
      // one level-2 pair per four input samples
      checks++;
      if (strobes - s0 != (cycles - c0) / 4) begin
        failures++;
        $display("FAIL rate: %0d strobes in %0d clocks", strobes - s0, cycles - c0);
      end
    end

    // ---- phase 3: reset in mid-stream, then more random data -----------
    for (int r = 0; r < 3; r++) begin
      repeat (5 + r) begin
        e1 = 4'($urandom);
        clock("pre-reset");
      end
      rst_n = 1'b0;
      @(negedge clk);
      model_reset();
      resets++;
      rst_n = 1'b1;
      compare("reset");
      repeat (200) begin
        e1 = 4'($urandom);
        if (($urandom % 23) == 0) begin sel = ~sel; switches++; end
        clock("after-reset");
      end
    end

    $display("level-1 drops %0d, level-2 drops %0d, sel0 pairs %0d, sel1 pairs %0d, sel switches %0d, resets %0d",
             drop1, drop2, out_sel0, out_sel1, switches, resets);
    checks++; if (drop1 == 0)    begin failures++; $display("FAIL no level-1 decimation"); end
    checks++; if (drop2 == 0)    begin failures++; $display("FAIL no level-2 decimation"); end
    checks++; if (out_sel0 == 0) begin failures++; $display("FAIL no sel=0 output");      end
    checks++; if (out_sel1 == 0) begin failures++; $display("FAIL no sel=1 output");      end
    checks++; if (switches == 0) begin failures++; $display("FAIL no sel switch");        end
    checks++; if (resets == 0)   begin failures++; $display("FAIL no reset");             end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
