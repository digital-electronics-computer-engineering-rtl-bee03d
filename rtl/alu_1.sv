// alu_1: one-bit ALU slice. f[2] inverts b (and, at the bottom of the chain,
// supplies the carry-in, so add becomes subtract). f[1:0] picks the output:
// 00 a AND b', 01 a OR b', 10 the full-adder sum, 11 the 'less' input (used
// by bit 0 for set-less-than). The raw sum is also brought out so the top
// slice can feed the sign of a-b back to bit 0. Combinational.
// The slice structure and encoding are this design's choice.
module alu_1 (
  input  logic       a,
  input  logic       b,
  input  logic       cin,
  input  logic       less,
  input  logic [2:0] f,
  output logic       y,
  output logic       cout,
  output logic       sum
);
  logic bb;

  assign bb = f[2] ? ~b : b;

  fulladd u_fa (.a(a), .b(bb), .cin(cin), .s(sum), .cout(cout));

  always_comb begin
    unique case (f[1:0])
      2'b00:   y = a & bb;
      2'b01:   y = a | bb;
      2'b10:   y = sum;
      default: y = less;
    endcase
  end
endmodule
