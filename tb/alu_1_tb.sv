// alu_1_tb: exhaustive check of the one-bit ALU slice over all 128 input
// combinations: and / or of a with b (b inverted when f[2]), the full-adder
// sum and carry, and the pass-through of 'less'.
module alu_1_tb;
  logic a, b, cin, less, y, cout, sum;
  logic [2:0] f;
  int checks = 0, failures = 0;

  alu_1 dut (.a(a), .b(b), .cin(cin), .less(less), .f(f), .y(y), .cout(cout), .sum(sum));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic bb, ey;
    logic [1:0] tot;
    for (int i = 0; i < 128; i++) begin
      {a, b, cin, less, f} = 7'(i);
      #1;
      bb  = f[2] ? !b : b;
      tot = 2'(int'(a) + int'(bb) + int'(cin));
      case (f[1:0])
        2'b00: ey = a && bb;
        2'b01: ey = a || bb;
        2'b10: ey = tot[0];
        default: ey = less;
      endcase
      checks++;
      if (y !== ey || cout !== tot[1] || sum !== tot[0]) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b less=%0b f=%03b -> y=%0b cout=%0b", a, b, cin, less, f, y, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
