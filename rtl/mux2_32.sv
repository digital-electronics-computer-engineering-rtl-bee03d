// mux2_32: 32-bit two-to-one multiplexer, y = s ? d1 : d0. Used for the next
// PC, the ALU source B and the write-back result. Combinational.
module mux2_32 (
  input  logic [31:0] d0,
  input  logic [31:0] d1,
  input  logic        s,
  output logic [31:0] y
);
  always_comb y = s ? d1 : d0;
endmodule
