// control: the controller ("cbox") of the single-cycle MIPS. A main decoder
// turns the opcode into the datapath controls and a two-bit ALUOp; an ALU
// decoder turns ALUOp and funct[3:0] into ALUControl. Combinational.
//
//   op      regwrite regdst alusrc branch memwrite memtoreg memread jump ALUOp
//   R-type     1       1      0      0       0        0       0      0    10
//   lw         1       0      1      0       0        1       1      0    00
//   sw         0       0      1      0       1        0       0      0    00
//   beq        0       0      0      1       0        0       0      0    01
//   addi       1       0      1      0       0        0       0      0    00
//   j          0       0      0      0       0        0       0      1    00
//
// ALUOp 00 adds, 01 subtracts, 10 follows funct (add, sub, and, or, slt).
// Unknown opcodes and functs drive no write. Only funct[3:0] is examined,
// which is enough to tell the five R-type operations apart. jump and memread
// are produced but the processor does not use them. The table is the usual
// one for this instruction subset; unknown-code behaviour is this design's
// choice.
module control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [3:0] funct,
  output logic       regwrite,
  output logic       regdst,
  output logic       alusrc,
  output logic       branch,
  output logic       memwrite,
  output logic       memtoreg,
  output logic       memread,
  output logic       jump,
  output logic [2:0] alucontrol
);
  logic [1:0] aluop;
  logic       known_fn;

  // main decoder
  always_comb begin
    {regwrite, regdst, alusrc, branch, memwrite, memtoreg, memread, jump} = '0;
    aluop = 2'b00;
    case (op)
      OP_RTYPE: begin regwrite = 1'b1; regdst = 1'b1; aluop = 2'b10; end
      OP_LW:    begin regwrite = 1'b1; alusrc = 1'b1; memtoreg = 1'b1; memread = 1'b1; end
      OP_SW:    begin alusrc = 1'b1; memwrite = 1'b1; end
      OP_BEQ:   begin branch = 1'b1; aluop = 2'b01; end
      OP_ADDI:  begin regwrite = 1'b1; alusrc = 1'b1; end
      OP_J:     begin jump = 1'b1; end
      default:  ;
    endcase
    // an R-type instruction with an unknown funct must not write a register
    if (op == OP_RTYPE && !known_fn) regwrite = 1'b0;
  end

  // ALU decoder
  always_comb begin
    known_fn   = 1'b1;
    alucontrol = ALU_ADD;
    case (aluop)
      2'b00: alucontrol = ALU_ADD;
      2'b01: alucontrol = ALU_SUB;
      default:
        case (funct)
          FN_ADD:  alucontrol = ALU_ADD;
          FN_SUB:  alucontrol = ALU_SUB;
          FN_AND:  alucontrol = ALU_AND;
          FN_OR:   alucontrol = ALU_OR;
          FN_SLT:  alucontrol = ALU_SLT;
          default: begin alucontrol = ALU_ADD; known_fn = 1'b0; end
        endcase
    endcase
  end
endmodule
