// mips_tb: end-to-end run of the single-cycle MIPS with every parameter at
// its default, i.e. the Fibonacci program in instruction memory.
//
// Clock period 10 ns. Reset is high for the first cycle and through the
// first rising edge, then low. Each cycle is sampled just before its ending
// rising edge and compared with
//   - an instruction-level reference model kept in this testbench (its own
//     register file, data memory and PC, fed from the same program file),
//     which predicts PC, instruction, SrcA, SrcB, ALUResult, WriteData,
//     MemWrite and Zero every cycle;
//   - the expected trace rows for cycles 1-6 and 24 (PC, instruction, SrcA,
//     SrcB, ALUResult);
//   - the result: ALUResult = 0000000D (Fibonacci number 13, the value
//     moved into $t2) in cycle 50, and the processor parked in the
//     infinite loop at PC 0x24 from cycle 54 on.
// It also counts how often the mechanisms the program uses occur (branch
// taken, branch not taken, R-type write-back, addi write-back, the final
// self-loop) and counts a failure for any that never occurs.
module mips_tb;
  logic clk = 0, reset;
  logic [31:0] pc, instr, srca, srcb, aluresult, writedata;
  logic        memwrite, zero;
  int checks = 0, failures = 0;

  mips dut (.clk(clk), .reset(reset), .pc(pc), .instr(instr), .srca(srca), .srcb(srcb),
            .aluresult(aluresult), .writedata(writedata), .memwrite(memwrite), .zero(zero));

  always #5 clk = ~clk;

  localparam int NCYCLES = 60;

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

  // ---------------- expected trace rows ----------------
  typedef struct packed {
    logic [31:0] pc, instr, srca, srcb, res;
  } row_t;

  function automatic bit trace_row(int cyc, output row_t t);
    case (cyc)
      1, 2: t = '{32'h00, 32'h20080008, 32'h0, 32'h8, 32'h8};
      3:    t = '{32'h04, 32'h2009ffff, 32'h0, 32'hffffffff, 32'hffffffff};
      4:    t = '{32'h08, 32'h200a0001, 32'h0, 32'h1, 32'h1};
      5:    t = '{32'h0c, 32'h11000005, 32'h8, 32'h0, 32'h8};
      6:    t = '{32'h10, 32'h012a5820, 32'hffffffff, 32'h1, 32'h0};
      24:   t = '{32'h10, 32'h012a5820, 32'h1, 32'h1, 32'h2};
      default: return 0;
    endcase
    return 1;
  endfunction

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
    row_t  t;
    $readmemh("rtl/fib.hex", prog);
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
      if (trace_row(cyc, t))
        check({pc, instr, srca, srcb, aluresult} == t, "expected trace row", cyc);
      if (cyc == 50) check(aluresult == 32'h0000000d, "Fibonacci result 0000000D", cyc);
      if (cyc >= 54) check(pc == 32'h24, "infinite loop at PC 0x24", cyc);
      commit(prog[rpc[5:2]], p, reset);
      @(posedge clk);
      #9;
    end
    check(n_taken > 0,     "a branch was taken", NCYCLES);
    check(n_not_taken > 0, "a branch was not taken", NCYCLES);
    check(n_rtype > 0,     "an R-type write-back happened", NCYCLES);
    check(n_addi > 0,      "an addi write-back happened", NCYCLES);
    check(n_selfloop > 0,  "the final self-loop was reached", NCYCLES);
    $display("mechanisms: taken=%0d not_taken=%0d rtype=%0d addi=%0d selfloop=%0d",
             n_taken, n_not_taken, n_rtype, n_addi, n_selfloop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
