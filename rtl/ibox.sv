// ibox: instruction fetch of the single-cycle MIPS. The PC (flopr_32, reset
// to 0) addresses imem at PC[5:2]. One adder_32 forms PC+4, a second forms
// the branch target PC+4 + (sign-extended Instruction[15:0] << 2), and a
// mux2_32 loads the target when branch and zero are both high (a taken beq),
// PC+4 otherwise. The PC advances at every rising clk edge while reset is
// low. Forming PCSrc = branch & zero inside the ibox is this design's choice.
module ibox #(
  parameter string IMEM_FILE = "rtl/fib.hex"
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        branch,
  input  logic        zero,
  output logic [31:0] pc,
  output logic [31:0] instr
);
  logic [31:0] pcnext, pcplus4, pcbranch, signimm;
  logic        pcsrc;

  flopr_32 #(.WIDTH(32)) u_pcreg (.clk(clk), .reset(reset), .d(pcnext), .q(pc));
  adder_32 #(.WIDTH(32)) u_pcadd (.a(pc), .b(32'd4), .y(pcplus4));
  sgnext                 u_se    (.a(instr[15:0]), .y(signimm));
  adder_32 #(.WIDTH(32)) u_bradd (.a(pcplus4), .b({signimm[29:0], 2'b00}), .y(pcbranch));

  assign pcsrc = branch & zero;
  mux2_32 u_pcmux (.d0(pcplus4), .d1(pcbranch), .s(pcsrc), .y(pcnext));

  imem #(.DEPTH(16), .INIT_FILE(IMEM_FILE)) u_imem (.a(pc[5:2]), .rd(instr));

  // The 16-word instruction memory decodes only PC[5:2].
  logic unused_pc;
  assign unused_pc = ^{pc[31:6], pc[1:0], signimm[31:30]};
endmodule
