// alu_4: four alu_1 slices with a ripple carry. 'less' drives the less input
// of bit 0 (bits 1-3 get 0); sum3 is the adder sum of bit 3, which the top
// slice of alu_32 returns to bit 0 for set-less-than. Combinational.
module alu_4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  input  logic       less,
  input  logic [2:0] f,
  output logic [3:0] y,
  output logic       cout,
  output logic       sum3
);
  logic c1, c2, c3;
  logic s0, s1, s2;

  alu_1 u_b0 (.a(a[0]), .b(b[0]), .cin(cin), .less(less), .f(f), .y(y[0]), .cout(c1),   .sum(s0));
  alu_1 u_b1 (.a(a[1]), .b(b[1]), .cin(c1),  .less(1'b0), .f(f), .y(y[1]), .cout(c2),   .sum(s1));
  alu_1 u_b2 (.a(a[2]), .b(b[2]), .cin(c2),  .less(1'b0), .f(f), .y(y[2]), .cout(c3),   .sum(s2));
  alu_1 u_b3 (.a(a[3]), .b(b[3]), .cin(c3),  .less(1'b0), .f(f), .y(y[3]), .cout(cout), .sum(sum3));

  // Sums of the lower bits only feed the output multiplexers inside the slices.
  logic unused_sums;
  assign unused_sums = ^{s0, s1, s2};
endmodule
