// control_tb: checks the controller's outputs for every supported
// instruction against a table of expected control words, and checks that
// an unknown opcode or R-type funct enables no write.
module control_tb;
  import mips_pkg::*;
  logic [5:0] op;
  logic [3:0] funct;
  logic regwrite, regdst, alusrc, branch, memwrite, memtoreg, memread, jump;
  logic [2:0] alucontrol;
  int checks = 0, failures = 0;

  control dut (.op(op), .funct(funct), .regwrite(regwrite), .regdst(regdst),
               .alusrc(alusrc), .branch(branch), .memwrite(memwrite),
               .memtoreg(memtoreg), .memread(memread), .jump(jump),
               .alucontrol(alucontrol));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {regwrite, regdst, alusrc, branch, memwrite, memtoreg, memread, jump}
  // and alucontrol; the alu field is not compared where 'dc' is set
  task automatic check(string name, logic [5:0] o, logic [3:0] fn,
                       logic [7:0] ectl, logic [2:0] ealu, bit dc = 0);
    logic [7:0] ctl;
    op = o; funct = fn;
    #1;
    ctl = {regwrite, regdst, alusrc, branch, memwrite, memtoreg, memread, jump};
    checks++;
    if (ctl !== ectl || (!dc && alucontrol !== ealu)) begin
      failures++;
      $display("FAIL %s: ctl=%08b alu=%03b, expected %08b %03b", name, ctl, alucontrol, ectl, ealu);
    end
  endtask

  initial begin
    check("add",  6'b000000, 4'b0000, 8'b1100_0000, 3'b010);
    check("sub",  6'b000000, 4'b0010, 8'b1100_0000, 3'b110);
    check("and",  6'b000000, 4'b0100, 8'b1100_0000, 3'b000);
    check("or",   6'b000000, 4'b0101, 8'b1100_0000, 3'b001);
    check("slt",  6'b000000, 4'b1010, 8'b1100_0000, 3'b111);
    check("lw",   6'b100011, 4'b0000, 8'b1010_0110, 3'b010);
    check("sw",   6'b101011, 4'b0000, 8'b0010_1000, 3'b010);
    check("beq",  6'b000100, 4'b0101, 8'b0001_0000, 3'b110);
    check("addi", 6'b001000, 4'b1111, 8'b1010_0000, 3'b010);
    check("j",    6'b000010, 4'b0000, 8'b0000_0001, 3'b000, 1);
    // lw/sw/addi/beq must ignore whatever sits in funct
    for (int fn = 0; fn < 16; fn++) begin
      check("addi any funct", 6'b001000, 4'(fn), 8'b1010_0000, 3'b010);
      check("beq any funct",  6'b000100, 4'(fn), 8'b0001_0000, 3'b110);
    end
    check("unknown op", 6'b111111, 4'b0000, 8'b0000_0000, 3'b000, 1);
    check("unknown funct", 6'b000000, 4'b1111, 8'b0100_0000, 3'b000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
