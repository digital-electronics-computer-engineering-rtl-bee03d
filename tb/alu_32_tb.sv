// alu_32_tb: checks the 32-bit ALU for add, sub, and, or and slt on
// directed corner values and on random operands, and checks the zero flag.
// Expected values come from SystemVerilog's own arithmetic; slt is the sign
// bit of a - b.
module alu_32_tb;
  import mips_pkg::*;
  logic [31:0] a, b, y;
  logic [2:0]  f;
  logic        zero;
  int checks = 0, failures = 0;

  alu_32 dut (.a(a), .b(b), .f(f), .y(y), .zero(zero));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(logic [31:0] x, logic [31:0] z, alu_ctrl_e op);
    logic [31:0] d;
    d = x - z;
    case (op)
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_ADD: return x + z;
      ALU_SUB: return d;
      default: return {31'd0, d[31]};
    endcase
  endfunction

  task automatic check(logic [31:0] x, logic [31:0] z, alu_ctrl_e op);
    logic [31:0] e;
    a = x; b = z; f = op;
    #1;
    e = model(x, z, op);
    checks++;
    if (y !== e || zero !== (e == 32'd0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h b=%h -> y=%h zero=%0b, expected %h", op.name(), x, z, y, zero, e);
    end
  endtask

  localparam alu_ctrl_e OPS [5] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT};

  initial begin
    logic [31:0] corner [8];
    corner = '{32'h0, 32'h1, 32'hffffffff, 32'h7fffffff, 32'h80000000, 32'h8, 32'hffff0000, 32'h0000ffff};
    foreach (OPS[k])
      foreach (corner[i])
        foreach (corner[j]) check(corner[i], corner[j], OPS[k]);
    // values from the Fibonacci trace: addi 0+8, addi 0+(-1), beq 8-0
    check(32'd0, 32'd8, ALU_ADD);
    check(32'd0, 32'hffffffff, ALU_ADD);
    check(32'd8, 32'd0, ALU_SUB);
    check(32'd5, 32'd5, ALU_SUB);   // beq equal: zero must be 1
    for (int n = 0; n < 2000; n++)
      check($urandom, $urandom, OPS[$urandom_range(4)]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
