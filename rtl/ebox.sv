// ebox: execution box of the single-cycle MIPS. It receives Instruction[25:0]
// and the controls, and holds
//   - regfile (two reads, one write; two duplicate dual-port copies),
//   - mux2_5 choosing the destination register: rt, or rd when regdst=1,
//   - sgnext for the 16-bit immediate,
//   - mux2_32 choosing SrcB: register rt, or the immediate when alusrc=1,
//   - alu_32, giving ALUResult and zero,
//   - mux2_32 choosing the write-back value: ALUResult, or ReadData from
//     the dbox when memtoreg=1.
// SrcA is register rs; WriteData (register rt) goes to the dbox. The register
// write happens at the rising clk edge that ends the instruction's cycle;
// everything else is combinational.
module ebox (
  input  logic        clk,
  input  logic [25:0] instr,
  input  logic        regwrite,
  input  logic        regdst,
  input  logic        alusrc,
  input  logic        memtoreg,
  input  logic [2:0]  alucontrol,
  input  logic [31:0] readdata,
  output logic [31:0] srca,
  output logic [31:0] srcb,
  output logic [31:0] aluresult,
  output logic [31:0] writedata,
  output logic        zero
);
  logic [4:0]  rs, rt, rd, writereg;
  logic [31:0] signimm, result;

  assign rs = instr[25:21];
  assign rt = instr[20:16];
  assign rd = instr[15:11];

  regfile #(.NREGS(32), .WIDTH(32)) u_rf (
    .clk (clk),
    .we3 (regwrite),
    .ra1 (rs),
    .ra2 (rt),
    .wa3 (writereg),
    .wd3 (result),
    .rd1 (srca),
    .rd2 (writedata)
  );

  mux2_5  u_wrmux  (.d0(rt), .d1(rd), .s(regdst), .y(writereg));
  sgnext  u_se     (.a(instr[15:0]), .y(signimm));
  mux2_32 u_srcbmux(.d0(writedata), .d1(signimm), .s(alusrc), .y(srcb));
  alu_32  u_alu    (.a(srca), .b(srcb), .f(alucontrol), .y(aluresult), .zero(zero));
  mux2_32 u_resmux (.d0(aluresult), .d1(readdata), .s(memtoreg), .y(result));
endmodule
