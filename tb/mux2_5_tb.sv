// mux2_5_tb: checks the 5-bit two-to-one multiplexer with random data
// on both inputs and both select values.
module mux2_5_tb;
  logic [5-1:0] d0, d1, y;
  logic s;
  int checks = 0, failures = 0;

  mux2_5 dut (.d0(d0), .d1(d1), .s(s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      d0 = 5'($urandom);
      d1 = 5'($urandom) ^ 5'(1);
      if (d1 == d0) d1 = ~d0;
      s  = n[0];
      #1;
      checks++;
      if (y !== (n[0] ? d1 : d0)) begin
        failures++;
        $display("FAIL s=%0b d0=%h d1=%h y=%h", s, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
