// ebox_tb: drives the execution box as the controller would for addi, the
// five R-type operations, lw (write-back of ReadData), sw (WriteData out)
// and beq (zero flag), with a register-file model in the testbench. Each
// cycle it checks SrcA, SrcB, ALUResult, WriteData and Zero before the
// clock edge; register writes then show up in later operands. A write to
// $0 must leave it reading 0.
module ebox_tb;
  logic clk = 0;
  logic [25:0] instr;
  logic regwrite, regdst, alusrc, memtoreg, zero;
  logic [2:0]  alucontrol;
  logic [31:0] readdata, srca, srcb, aluresult, writedata;
  logic [31:0] regs [32];
  int checks = 0, failures = 0;
  bit clearing;   // rt not yet written: WriteData is not known

  ebox dut (.clk(clk), .instr(instr), .regwrite(regwrite), .regdst(regdst),
            .alusrc(alusrc), .memtoreg(memtoreg), .alucontrol(alucontrol),
            .readdata(readdata), .srca(srca), .srcb(srcb), .aluresult(aluresult),
            .writedata(writedata), .zero(zero));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum {K_ADDI, K_ADD, K_SUB, K_AND, K_OR, K_SLT, K_LW, K_SW, K_BEQ} kind_e;

  // one instruction: drive at negedge, check, let the posedge write back
  task automatic run(kind_e k, logic [4:0] rs, logic [4:0] rt, logic [4:0] rd,
                     logic [15:0] imm, logic [31:0] mem_rdata = 32'd0);
    logic [31:0] a, b, simm, r, e_res;
    logic [4:0]  dst;
    logic        wr;
    @(negedge clk);
    simm = {{16{imm[15]}}, imm};
    a = regs[rs];
    b = regs[rt];
    instr = {rs, rt, (k inside {K_ADDI, K_LW, K_SW, K_BEQ}) ? imm : {rd, 5'd0, 6'd0}};
    readdata = mem_rdata;
    regwrite = !(k inside {K_SW, K_BEQ});
    regdst   = k inside {K_ADD, K_SUB, K_AND, K_OR, K_SLT};
    alusrc   = k inside {K_ADDI, K_LW, K_SW};
    memtoreg = (k == K_LW);
    case (k)
      K_SUB, K_BEQ: alucontrol = 3'b110;
      K_AND:        alucontrol = 3'b000;
      K_OR:         alucontrol = 3'b001;
      K_SLT:        alucontrol = 3'b111;
      default:      alucontrol = 3'b010;
    endcase
    case (k)
      K_ADDI, K_LW, K_SW: r = a + simm;
      K_ADD:  r = a + b;
      K_SUB, K_BEQ: r = a - b;
      K_AND:  r = a & b;
      K_OR:   r = a | b;
      default: begin r = a - b; r = {31'd0, r[31]}; end
    endcase
    #1;
    checks++;
    if (srca !== a || srcb !== (alusrc ? simm : b) || aluresult !== r ||
        (!clearing && writedata !== b) || zero !== (r == 32'd0)) begin
      failures++;
      $display("FAIL %s rs=%0d rt=%0d: srca=%h srcb=%h res=%h wd=%h z=%0b, expected %h %h %h %h",
               k.name(), rs, rt, srca, srcb, aluresult, writedata, zero,
               a, alusrc ? simm : b, r, b);
    end
    wr  = regwrite;
    dst = regdst ? rd : rt;
    e_res = memtoreg ? mem_rdata : r;
    @(posedge clk);
    if (wr && dst != 5'd0) regs[dst] = e_res;
  endtask

  initial begin
    foreach (regs[i]) regs[i] = 32'd0;
    instr = '0; regwrite = 0; regdst = 0; alusrc = 0; memtoreg = 0;
    alucontrol = 3'b010; readdata = 0;
    // clear all registers through the datapath (the register file has no reset)
    clearing = 1;
    for (int i = 1; i < 32; i++) run(K_ADDI, 5'd0, 5'(i), 5'd0, 16'd0);
    clearing = 0;
    run(K_ADDI, 0, 8, 0, 16'd8);        // addi $t0, $0, 8
    run(K_ADDI, 0, 9, 0, 16'hffff);     // addi $t1, $0, -1
    run(K_ADDI, 0, 10, 0, 16'd1);       // addi $t2, $0, 1
    run(K_BEQ,  8, 0, 0, 16'd5);        // beq $t0, $0: not equal
    run(K_ADD,  9, 10, 11, 0);          // add $t3, $t1, $t2 = 0
    run(K_BEQ, 11, 0, 0, 16'd5);        // equal: zero
    run(K_SUB,  8, 10, 12, 0);
    run(K_AND,  9, 8, 13, 0);
    run(K_OR,  10, 8, 14, 0);
    run(K_SLT,  9, 10, 15, 0);          // -1 < 1
    run(K_SLT, 10, 9, 16, 0);
    run(K_SW,   8, 12, 0, 16'd4);
    run(K_LW,   0, 17, 0, 16'd20, 32'h0badf00d);
    run(K_ADD, 17, 17, 18, 0);
    run(K_ADDI, 0, 0, 0, 16'd77);       // write to $0 is ignored
    run(K_ADD,  0, 0, 19, 0);
    for (int n = 0; n < 400; n++) begin
      kind_e k;
      k = kind_e'($urandom_range(8));
      run(k, 5'($urandom), 5'($urandom), 5'($urandom), 16'($urandom), $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
