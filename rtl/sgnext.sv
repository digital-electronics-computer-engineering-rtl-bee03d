// sgnext: sign extension of the 16-bit immediate to 32 bits (bit 15 copied
// into bits 31:16). Combinational.
module sgnext (
  input  logic [15:0] a,
  output logic [31:0] y
);
  assign y = {{16{a[15]}}, a};
endmodule
