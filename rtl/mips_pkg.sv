// mips_pkg: opcodes, function codes and ALU control encodings shared by the
// single-cycle MIPS processor. Only the low four funct bits are listed
// because the controller sees Instruction[3:0] of the funct field.
// The ALU control encoding (f[2] = invert B and carry in, f[1:0] = and / or /
// sum / set-less-than) is this design's choice.
package mips_pkg;

  typedef enum logic [5:0] {
    OP_RTYPE = 6'b000000,
    OP_J     = 6'b000010,
    OP_BEQ   = 6'b000100,
    OP_ADDI  = 6'b001000,
    OP_LW    = 6'b100011,
    OP_SW    = 6'b101011
  } opcode_e;

  // funct[3:0] of the R-type instructions
  typedef enum logic [3:0] {
    FN_ADD = 4'b0000,   // funct 100000
    FN_SUB = 4'b0010,   // funct 100010
    FN_AND = 4'b0100,   // funct 100100
    FN_OR  = 4'b0101,   // funct 100101
    FN_SLT = 4'b1010    // funct 101010
  } funct_lo_e;

  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_ctrl_e;

endpackage
