// dbox: data box of the single-cycle MIPS. It holds dmem (16 words x 32 bits)
// addressed by ALUResult[5:2]; the other address bits are not used, so the
// memory repeats every 64 bytes. Stores are written at the rising clk edge
// when memwrite is high; loads read combinationally in the same cycle.
module dbox (
  input  logic        clk,
  input  logic        memwrite,
  input  logic [31:0] aluresult,
  input  logic [31:0] writedata,
  output logic [31:0] readdata
);
  dmem #(.WIDTH(32), .DEPTH(16)) u_dmem (
    .clk (clk),
    .we  (memwrite),
    .a   (aluresult[5:2]),
    .wd  (writedata),
    .rd  (readdata)
  );

  // Address bits outside [5:2] have no load, as the memory is 16 words.
  logic unused_addr;
  assign unused_addr = ^{aluresult[31:6], aluresult[1:0]};
endmodule
