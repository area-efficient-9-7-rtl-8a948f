// tb_rca: checks the ripple carry adder exhaustively at its default 2 bits
// and at 4 bits, and with random operands at 11 bits, against integer
// addition.
module tb_rca;
  logic [1:0]  a2, b2, s2;
  logic        c2i, c2o;
  logic [3:0]  a4, b4, s4;
  logic        c4i, c4o;
  logic [10:0] a11, b11, s11;
  logic        c11i, c11o;
  int checks = 0, failures = 0;

  rca dut2 (.a(a2), .b(b2), .cin(c2i), .s(s2), .cout(c2o));
  rca #(.W(4)) dut4 (.a(a4), .b(b4), .cin(c4i), .s(s4), .cout(c4o));
  rca #(.W(11)) dut11 (.a(a11), .b(b11), .cin(c11i), .s(s11), .cout(c11o));

  initial begin
    for (int i = 0; i < 512; i++) begin
      {c4i, a4, b4} = 9'(i);
      {c2i, a2, b2} = 5'(i);
      a11 = 11'($urandom); b11 = 11'($urandom); c11i = 1'($urandom);
      #1;
      checks += 3;
      if ({c2o, s2} !== 3'(a2 + b2 + c2i)) begin
        failures++;
        $display("FAIL2 %0d+%0d+%0d -> %0d", a2, b2, c2i, {c2o, s2});
      end
      if ({c4o, s4} !== 5'(a4 + b4 + c4i)) begin
        failures++;
        $display("FAIL4 %0d+%0d+%0d -> %0d", a4, b4, c4i, {c4o, s4});
      end
      if ({c11o, s11} !== 12'(a11 + b11 + c11i)) begin
        failures++;
        $display("FAIL11 %0d+%0d+%0d -> %0d", a11, b11, c11i, {c11o, s11});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
