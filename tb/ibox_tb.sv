// ibox_tb: runs the instruction fetch box with its default program. It
// checks the PC held at 0 under reset, the PC+4 sequence, that branch
// without zero (or zero without branch) does not redirect, that a taken
// branch goes to PC+4 + 4*offset both forwards (0x0C -> 0x24) and backwards
// (0x20 -> 0x0C), and the instruction word fetched at each PC.
module ibox_tb;
  logic clk = 0, reset, branch, zero;
  logic [31:0] pc, instr;
  int checks = 0, failures = 0;

  ibox dut (.clk(clk), .reset(reset), .branch(branch), .zero(zero), .pc(pc), .instr(instr));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] PROG [10] = '{
    32'h20080008, 32'h2009ffff, 32'h200a0001, 32'h11000005, 32'h012a5820,
    32'h01404820, 32'h01605020, 32'h2108ffff, 32'h1000fffa, 32'h1000ffff};

  task automatic expect_pc(logic [31:0] e, string what);
    checks++;
    if (pc !== e || (e < 40 && instr !== PROG[e[5:2]])) begin
      failures++;
      $display("FAIL %s: pc=%h instr=%h, expected pc %h", what, pc, instr, e);
    end
  endtask

  // one cycle with the given branch/zero, then check the next PC
  task automatic step(logic br, logic z, logic [31:0] e, string what);
    branch = br; zero = z;
    @(negedge clk);
    expect_pc(e, what);
  endtask

  initial begin
    reset = 1; branch = 0; zero = 0;
    @(negedge clk);
    expect_pc(32'h0, "reset");
    @(negedge clk);
    expect_pc(32'h0, "reset held");
    reset = 0;
    step(0, 0, 32'h04, "pc+4");
    step(0, 1, 32'h08, "zero alone");
    step(1, 0, 32'h0c, "branch not taken");
    step(1, 1, 32'h24, "forward branch 0x0c+4+5*4");
    step(1, 1, 32'h24, "branch to itself");
    step(0, 0, 32'h28, "pc+4 past the program");
    // back to 0x20 via reset and stepping
    reset = 1;
    @(negedge clk);
    reset = 0;
    expect_pc(32'h0, "second reset");
    for (int i = 1; i <= 8; i++) step(0, 0, 32'(4 * i), "sequential");
    step(1, 1, 32'h0c, "backward branch 0x20+4-6*4");
    step(0, 0, 32'h10, "after backward branch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
