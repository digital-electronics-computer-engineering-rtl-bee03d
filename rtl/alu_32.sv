// alu_32: 32-bit ALU of the processor, eight alu_4 slices in a ripple chain.
// f (ALUControl, see mips_pkg::alu_ctrl_e): 010 add, 110 sub, 000 and,
// 001 or, 111 slt. f[2] is the carry into bit 0, so subtraction is a + ~b + 1.
// For slt, bit 0 takes the sign of a - b from the top slice (no overflow
// correction) and bits 31:1 are 0. zero is high when y is all zeros; the
// single-cycle machine uses it to decide beq. Combinational.
// The slice structure follows the part names alu_1 / alu_4 / alu_32; the
// encoding and the slt method are this design's choice.
module alu_32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [2:0]  f,
  output logic [31:0] y,
  output logic        zero
);
  // carry into slice k is c[k]; kept as separate nets per slice
  logic c0, c1, c2, c3, c4, c5, c6, c7, c8;
  logic [7:0] sum3;
  logic       sign;

  assign c0 = f[2];

  alu_4 u_s0 (.a(a[3:0]),   .b(b[3:0]),   .cin(c0), .less(sign), .f(f), .y(y[3:0]),   .cout(c1), .sum3(sum3[0]));
  alu_4 u_s1 (.a(a[7:4]),   .b(b[7:4]),   .cin(c1), .less(1'b0), .f(f), .y(y[7:4]),   .cout(c2), .sum3(sum3[1]));
  alu_4 u_s2 (.a(a[11:8]),  .b(b[11:8]),  .cin(c2), .less(1'b0), .f(f), .y(y[11:8]),  .cout(c3), .sum3(sum3[2]));
  alu_4 u_s3 (.a(a[15:12]), .b(b[15:12]), .cin(c3), .less(1'b0), .f(f), .y(y[15:12]), .cout(c4), .sum3(sum3[3]));
  alu_4 u_s4 (.a(a[19:16]), .b(b[19:16]), .cin(c4), .less(1'b0), .f(f), .y(y[19:16]), .cout(c5), .sum3(sum3[4]));
  alu_4 u_s5 (.a(a[23:20]), .b(b[23:20]), .cin(c5), .less(1'b0), .f(f), .y(y[23:20]), .cout(c6), .sum3(sum3[5]));
  alu_4 u_s6 (.a(a[27:24]), .b(b[27:24]), .cin(c6), .less(1'b0), .f(f), .y(y[27:24]), .cout(c7), .sum3(sum3[6]));
  alu_4 u_s7 (.a(a[31:28]), .b(b[31:28]), .cin(c7), .less(1'b0), .f(f), .y(y[31:28]), .cout(c8), .sum3(sum3[7]));

  assign sign = sum3[7];
  assign zero = (y == 32'd0);

  // The carry out of the top slice is not used by any instruction.
  logic unused_bits;
  assign unused_bits = ^{c8, sum3[6:0]};
endmodule
