// tb_mxor: exhaustive check of the modified XOR / half adder cell against
// the truth table of a half adder (s = a xor b, c = a and b).
module tb_mxor;
  logic a, b, s, c;
  int checks = 0, failures = 0;

  mxor dut (.a(a), .b(b), .s(s), .c(c));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (s !== (a ^ b) || c !== (a & b)) begin
        failures++;
        $display("FAIL a=%b b=%b s=%b c=%b", a, b, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
