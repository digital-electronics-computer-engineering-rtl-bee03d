// fulladd_tb: exhaustive check of the one-bit full adder against integer
// addition of its three inputs.
module fulladd_tb;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  fulladd dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      checks++;
      if ({cout, s} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> cout=%0b s=%0b", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
