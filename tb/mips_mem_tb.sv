// mips_mem_tb: end-to-end run of the single-cycle MIPS on a second
// program, tb/memtest.hex, that uses what the Fibonacci program does not:
// sub, and, or, slt (true and false, and with a negative operand), sw and
// lw through the data memory (a value stored, loaded back and added), and a
// beq that is not taken because its operands differ. The instruction
// memory file is the only parameter changed.
//
//   00 addi $s0,$0,5      04 addi $s1,$0,12     08 sub $t0,$s1,$s0
//   0C and  $t1,$s1,$s0   10 or   $t2,$s1,$s0   14 slt $t3,$s0,$s1
//   18 slt  $t4,$s1,$s0   1C sw   $t0,60($0)    20 sw  $t2,4($s1)
//   24 lw   $s2,60($0)    28 lw   $s3,16($0)    2C add $s4,$s2,$s3
//   30 addi $s5,$0,-3     34 slt  $s6,$s5,$0    38 beq $s6,$0,+1
//   3C beq  $0,$0,-1 (self-loop)
//
// As in mips_tb, every cycle is compared with an instruction-level
// reference model in this testbench; in addition the values the program
// must produce are checked outright (7 stored, 13 stored at byte 16,
// 7 + 13 = 20 from the two loads), and each mechanism is counted.
module mips_mem_tb;
  logic clk = 0, reset;
  logic [31:0] pc, instr, srca, srcb, aluresult, writedata;
  logic        memwrite, zero;
  int checks = 0, failures = 0;

  mips #(.IMEM_FILE("tb/memtest.hex")) dut (.clk(clk), .reset(reset), .pc(pc), .instr(instr), .srca(srca), .srcb(srcb),
            .aluresult(aluresult), .writedata(writedata), .memwrite(memwrite), .zero(zero));

  always #5 clk = ~clk;

  localparam int NCYCLES = 24;

  initial begin
    repeat (NCYCLES + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  logic [31:0] prog [16];
  logic [31:0] r    [32];
  logic [31:0] m    [16];
  logic [31:0] rpc;
  int n_taken, n_not_taken, n_rtype, n_addi, n_selfloop, n_lw, n_sw;

  typedef struct packed {
    logic [31:0] srca, srcb, res, wd;
    logic        memwrite, zero;
  } pred_t;

  function automatic logic [31:0] rd_reg(logic [4:0] k);
    return (k == 0) ? 32'd0 : r[k];
  endfunction

  function automatic pred_t predict(logic [31:0] ins);
    pred_t p;
    logic [31:0] a, b, imm, d;
    a   = rd_reg(ins[25:21]);
    b   = rd_reg(ins[20:16]);
    imm = {{16{ins[15]}}, ins[15:0]};
    p = '0;
    p.srca = a;
    p.wd   = b;
    case (ins[31:26])
      6'h00: begin
        p.srcb = b;
        d = a - b;
        case (ins[5:0])
          6'h20: p.res = a + b;
          6'h22: p.res = d;
          6'h24: p.res = a & b;
          6'h25: p.res = a | b;
          default: p.res = {31'd0, d[31]};
        endcase
      end
      6'h04: begin p.srcb = b; p.res = a - b; end
      default: begin p.srcb = imm; p.res = a + imm; end   // addi, lw, sw
    endcase
    p.memwrite = (ins[31:26] == 6'h2b);
    p.zero = (p.res == 32'd0);
    return p;
  endfunction

  // state update at the rising edge
  task automatic commit(logic [31:0] ins, pred_t p, logic rst);
    logic [31:0] next;
    next = rpc + 4;
    case (ins[31:26])
      6'h00: begin if (ins[15:11] != 0) r[ins[15:11]] = p.res; n_rtype++; end
      6'h08: begin if (ins[20:16] != 0) r[ins[20:16]] = p.res; n_addi++; end
      6'h23: begin if (ins[20:16] != 0) r[ins[20:16]] = m[p.res[5:2]]; n_lw++; end
      6'h2b: begin m[p.res[5:2]] = p.wd; n_sw++; end
      6'h04: begin
        if (p.zero) begin
          next = rpc + 4 + {{14{ins[15]}}, ins[15:0], 2'b00};
          n_taken++;
          if (next == rpc) n_selfloop++;
        end else n_not_taken++;
      end
      default: ;
    endcase
    rpc = rst ? 32'd0 : next;
  endtask

  task automatic check(bit ok, string what, int cyc);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL cycle %0d: %s (pc=%h instr=%h srca=%h srcb=%h res=%h)",
               cyc, what, pc, instr, srca, srcb, aluresult);
    end
  endtask

  initial begin
    pred_t p;
    foreach (prog[i]) prog[i] = 32'd0;
    $readmemh("tb/memtest.hex", prog);
    foreach (r[i]) r[i] = 32'd0;
    foreach (m[i]) m[i] = 32'd0;
    rpc = 0;
    {n_taken, n_not_taken, n_rtype, n_addi, n_selfloop, n_lw, n_sw} = '0;
    reset = 0;
    #1 reset = 1;
    #3;   // each cycle is sampled 1 ns before its ending rising edge
    for (int cyc = 1; cyc <= NCYCLES; cyc++) begin
      if (cyc == 2) reset = 0;
      p = predict(prog[rpc[5:2]]);
      check(pc == rpc, "PC", cyc);
      check(instr == prog[rpc[5:2]], "instruction", cyc);
      // registers not yet written by the program are not predicted
      if (cyc > 1) begin
        check(srca == p.srca && srcb == p.srcb && aluresult == p.res, "ALU operands/result", cyc);
        check(zero == p.zero && memwrite == p.memwrite, "zero/memwrite", cyc);
      end
      if (cyc == 9)  check(memwrite && aluresult == 32'd60 && writedata == 32'd7, "sw of 12-5", cyc);
      if (cyc == 10) check(memwrite && aluresult == 32'd16 && writedata == 32'd13, "sw of 12|5", cyc);
      if (cyc == 13) check(srca == 32'd7 && srcb == 32'd13 && aluresult == 32'd20, "add of two loaded words", cyc);
      if (cyc == 16) check(srca == 32'd1 && zero == 1'b0, "beq with unequal operands", cyc);
      if (cyc >= 18) check(pc == 32'h3c, "self-loop at 0x3C", cyc);
      commit(prog[rpc[5:2]], p, reset);
      @(posedge clk);
      #9;
    end
    check(n_taken > 0,     "a branch was taken", NCYCLES);
    check(n_not_taken > 0, "a branch was not taken", NCYCLES);
    check(n_rtype > 0,     "an R-type write-back happened", NCYCLES);
    check(n_addi > 0,      "an addi write-back happened", NCYCLES);
    check(n_sw > 0,        "a store happened", NCYCLES);
    check(n_lw > 0,        "a load happened", NCYCLES);
    check(n_selfloop > 0,  "the final self-loop was reached", NCYCLES);
    $display("mechanisms: taken=%0d not_taken=%0d rtype=%0d addi=%0d selfloop=%0d sw=%0d lw=%0d",
             n_taken, n_not_taken, n_rtype, n_addi, n_selfloop, n_sw, n_lw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
