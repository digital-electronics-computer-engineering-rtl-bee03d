// alu_4_tb: exhaustive check of the four-bit ALU slice (all 8192 input
// combinations) against a model written with word-level operators.
module alu_4_tb;
  logic [3:0] a, b, y;
  logic cin, less, cout, sum3;
  logic [2:0] f;
  int checks = 0, failures = 0;

  alu_4 dut (.a(a), .b(b), .cin(cin), .less(less), .f(f), .y(y), .cout(cout), .sum3(sum3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] bb, ey;
    logic [4:0] tot;
    for (int i = 0; i < 8192; i++) begin
      {a, b, cin, less, f} = 13'(i);
      #1;
      bb  = f[2] ? ~b : b;
      tot = {1'b0, a} + {1'b0, bb} + {4'd0, cin};
      case (f[1:0])
        2'b00: ey = a & bb;
        2'b01: ey = a | bb;
        2'b10: ey = tot[3:0];
        default: ey = {3'b000, less};
      endcase
      checks++;
      if (y !== ey || cout !== tot[4] || sum3 !== tot[3]) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h cin=%0b less=%0b f=%03b -> y=%h cout=%0b", a, b, cin, less, f, y, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
