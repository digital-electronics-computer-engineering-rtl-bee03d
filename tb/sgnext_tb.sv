// sgnext_tb: checks sign extension for all 65536 immediates against
// the value of the immediate as a signed integer.
module sgnext_tb;
  logic [15:0] a;
  logic [31:0] y;
  int checks = 0, failures = 0;

  sgnext dut (.a(a), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int i = 0; i < 65536; i++) begin
      a = 16'(i);
      #1;
      e = (i < 32768) ? i : i - 65536;
      checks++;
      if (int'(y) != e) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h y=%h", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
