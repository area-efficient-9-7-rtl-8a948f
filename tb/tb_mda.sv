// tb_mda: checks the distributed-arithmetic inner product for the default
// 5-input low-pass coefficient set (77, 34, -10, -2, 3) and a 4-input
// high-pass set (6, -4, -38, 72) against y = sum c_j * u_j computed with
// integer multiplication. Random inputs plus the extreme values.
module tb_mda;
  localparam int IN_W = 6;
  localparam int OUT_W = 16;
  localparam int LC [5] = '{77, 34, -10, -2, 3};
  localparam int HC [4] = '{6, -4, -38, 72};

  logic [4:0][IN_W-1:0] ul;
  logic [3:0][IN_W-1:0] uh;
  logic [OUT_W-1:0] yl, yh;
  int checks = 0, failures = 0;

  mda dut_l (.u(ul), .y(yl));
  mda #(.NTAP(4), .IN_W(IN_W), .OUT_W(OUT_W),
        .COEFS({8'sd72, -8'sd38, -8'sd4, 8'sd6})) dut_h (.u(uh), .y(yh));

  function automatic int sv(input logic [IN_W-1:0] v);
    return int'($signed(v));
  endfunction

  task automatic check();
    int el = 0, eh = 0;
    #1;
    for (int j = 0; j < 5; j++) el += LC[j] * sv(ul[j]);
    for (int j = 0; j < 4; j++) eh += HC[j] * sv(uh[j]);
    checks += 2;
    if (int'($signed(yl)) != el) begin
      failures++; $display("FAIL low  got %0d expected %0d", $signed(yl), el);
    end
    if (int'($signed(yh)) != eh) begin
      failures++; $display("FAIL high got %0d expected %0d", $signed(yh), eh);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      for (int j = 0; j < 5; j++) ul[j] = IN_W'($urandom);
      for (int j = 0; j < 4; j++) uh[j] = IN_W'($urandom);
      check();
    end
    for (int j = 0; j < 5; j++) ul[j] = {1'b1, {(IN_W-1){1'b0}}};
    for (int j = 0; j < 4; j++) uh[j] = {1'b1, {(IN_W-1){1'b0}}};
    check();
    for (int j = 0; j < 5; j++) ul[j] = {1'b0, {(IN_W-1){1'b1}}};
    for (int j = 0; j < 4; j++) uh[j] = {1'b0, {(IN_W-1){1'b1}}};
    check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
