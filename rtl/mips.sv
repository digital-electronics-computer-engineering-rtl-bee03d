// mips: single-cycle MIPS processor, the four boxes wired together.
//   ibox    - PC, PC+4 and branch-target adders, instruction memory
//   control - decodes Instruction[31:26] and Instruction[3:0]
//   ebox    - register file, sign extension, ALU, operand/result muxes;
//             receives Instruction[25:0]
//   dbox    - 16 x 32 data memory at ALUResult[5:2]
// Every instruction finishes in one clock cycle: register and memory writes
// and the PC update all happen at the rising clk edge. Supported: add, sub,
// and, or, slt, addi, lw, sw, beq. The controller's jump and memread outputs
// are left open because j is not executed and the memory always reads.
// As specified, the processor has only clk and reset as ports; the outputs here
// only expose the signals one watches while it runs (PC, instruction, ALU
// operands and result, store data, memwrite, zero) and are this design's
// choice. reset is active high and asynchronous to the PC.
module mips #(
  parameter string IMEM_FILE = "rtl/fib.hex"
) (
  input  logic        clk,
  input  logic        reset,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic [31:0] srca,
  output logic [31:0] srcb,
  output logic [31:0] aluresult,
  output logic [31:0] writedata,
  output logic        memwrite,
  output logic        zero
);
  logic       regwrite, regdst, alusrc, branch, memtoreg;
  logic [2:0] alucontrol;
  logic [31:0] readdata;
  logic       memread, jump;  // decoded, not used by this datapath

  ibox #(.IMEM_FILE(IMEM_FILE)) u_ibox (
    .clk(clk), .reset(reset), .branch(branch), .zero(zero), .pc(pc), .instr(instr)
  );

  control u_control (
    .op(instr[31:26]), .funct(instr[3:0]),
    .regwrite(regwrite), .regdst(regdst), .alusrc(alusrc), .branch(branch),
    .memwrite(memwrite), .memtoreg(memtoreg), .memread(memread), .jump(jump),
    .alucontrol(alucontrol)
  );

  ebox u_ebox (
    .clk(clk), .instr(instr[25:0]),
    .regwrite(regwrite), .regdst(regdst), .alusrc(alusrc), .memtoreg(memtoreg),
    .alucontrol(alucontrol), .readdata(readdata),
    .srca(srca), .srcb(srcb), .aluresult(aluresult), .writedata(writedata), .zero(zero)
  );

  dbox u_dbox (
    .clk(clk), .memwrite(memwrite), .aluresult(aluresult),
    .writedata(writedata), .readdata(readdata)
  );
  logic unused_ctrl;
  assign unused_ctrl = memread ^ jump;
endmodule
