// adder_32: WIDTH-bit adder (32 by default) used twice in the ibox, for PC+4
// and for the branch target. The carry out is dropped. Combinational.
module adder_32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  assign y = a + b;
endmodule
