// tb_mcsla: checks the square-root carry select adder at every tabulated
// width (4, 8, 16, 32, 64 bits): random operands plus the corner cases that
// make a carry run through every group (all ones plus one, all ones plus
// all ones), compared with integer addition.
module tb_mcsla;
  int checks = 0, failures = 0;

  logic [3:0]  a4,  b4,  s4;
  logic [7:0]  a8,  b8,  s8;
  logic [15:0] a16, b16, s16;
  logic [31:0] a32, b32, s32;
  logic [63:0] a64, b64, s64;
  logic        cin, c4, c8, c16, c32, c64;

  mcsla #(.WIDTH(4))  d4  (.a(a4),  .b(b4),  .cin(cin), .s(s4),  .cout(c4));
  mcsla #(.WIDTH(8))  d8  (.a(a8),  .b(b8),  .cin(cin), .s(s8),  .cout(c8));
  mcsla               d16 (.a(a16), .b(b16), .cin(cin), .s(s16), .cout(c16));
  mcsla #(.WIDTH(32)) d32 (.a(a32), .b(b32), .cin(cin), .s(s32), .cout(c32));
  mcsla #(.WIDTH(64)) d64 (.a(a64), .b(b64), .cin(cin), .s(s64), .cout(c64));

  task automatic check_all();
    logic [64:0] e64;
    #1;
    checks += 5;
    if ({c4, s4}   !== 5'(a4 + b4 + cin))    begin failures++; $display("FAIL4");  end
    if ({c8, s8}   !== 9'(a8 + b8 + cin))    begin failures++; $display("FAIL8");  end
    if ({c16, s16} !== 17'(a16 + b16 + cin)) begin failures++; $display("FAIL16 %h+%h+%b=%h", a16, b16, cin, {c16, s16}); end
    if ({c32, s32} !== 33'(a32 + b32 + cin)) begin failures++; $display("FAIL32"); end
    e64 = {1'b0, a64} + {1'b0, b64} + 65'(cin);
    if ({c64, s64} !== e64)                  begin failures++; $display("FAIL64"); end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      cin = 1'($urandom);
      a4 = 4'($urandom);  b4 = 4'($urandom);
      a8 = 8'($urandom);  b8 = 8'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom);
      a32 = $urandom; b32 = $urandom;
      a64 = {$urandom, $urandom}; b64 = {$urandom, $urandom};
      check_all();
    end
    // carry rippling through every group
    for (int k = 0; k < 4; k++) begin
      cin = k[0];
      {a4, a8, a16, a32, a64} = '1;
      if (k < 2) {b4, b8, b16, b32, b64} = '0;
      else       {b4, b8, b16, b32, b64} = '1;
      if (k == 1) begin b4 = 0; b8 = 0; b16 = 0; b32 = 0; b64 = 0; end
      check_all();
      cin = 1'b0;
      b4 = 1; b8 = 1; b16 = 1; b32 = 1; b64 = 1;
      check_all();
    end
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
