// adder_32_tb: checks the 32-bit adder on PC+4 style and random operands,
// including wrap-around past 2^32.
module adder_32_tb;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  adder_32 dut (.a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] z);
    logic [32:0] e;
    a = x; b = z;
    #1;
    e = {1'b0, x} + {1'b0, z};
    checks++;
    if (y !== e[31:0]) begin
      failures++;
      $display("FAIL %h + %h = %h, expected %h", x, z, y, e[31:0]);
    end
  endtask

  initial begin
    check(32'h0, 32'h4);
    check(32'h10, 32'hffffffe8);   // PC+4 plus a negative branch offset
    check(32'hffffffff, 32'h1);
    for (int n = 0; n < 1000; n++) check($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
