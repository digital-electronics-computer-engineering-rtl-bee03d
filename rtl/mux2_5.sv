// mux2_5: 5-bit two-to-one multiplexer, y = s ? d1 : d0. Picks the register
// to write: rt (Instruction[20:16]) or rd (Instruction[15:11]). Combinational.
module mux2_5 (
  input  logic [4:0] d0,
  input  logic [4:0] d1,
  input  logic       s,
  output logic [4:0] y
);
  always_comb y = s ? d1 : d0;
endmodule
