// tb_mxor_fa: exhaustive check of the 9-gate full adder: {cout, s} must
// equal a + b + cin for all eight input combinations.
module tb_mxor_fa;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  mxor_fa dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      checks++;
      if ({cout, s} !== 2'(a + b + cin)) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b -> cout=%b s=%b", a, b, cin, cout, s);
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
