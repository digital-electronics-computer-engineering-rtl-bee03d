// regfile_tb: checks the two-read, one-write register file. Every write
// must be seen on both read ports (both copies are written), the two ports
// must return independent registers in the same cycle, register 0 must
// read 0 even after a write to it, and writes land on the rising edge.
module regfile_tb;
  logic clk = 0, we3;
  logic [4:0]  ra1, ra2, wa3;
  logic [31:0] wd3, rd1, rd2;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk(clk), .we3(we3), .ra1(ra1), .ra2(ra2), .wa3(wa3), .wd3(wd3),
               .rd1(rd1), .rd2(rd2));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expv(logic [4:0] r);
    return (r == 5'd0) ? 32'd0 : model[r];
  endfunction

  task automatic expect_both(string what);
    checks++;
    if (rd1 !== expv(ra1) || rd2 !== expv(ra2)) begin
      failures++;
      $display("FAIL %s: r%0d=%h (exp %h) r%0d=%h (exp %h)", what,
               ra1, rd1, expv(ra1), ra2, rd2, expv(ra2));
    end
  endtask

  initial begin
    we3 = 0; ra1 = 0; ra2 = 0; wa3 = 0; wd3 = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we3 = 1; wa3 = 5'(i); wd3 = 32'h0100_0000 * 32'(i) + 32'(i); model[i] = wd3;
    end
    @(negedge clk);
    we3 = 0;
    // the same register on both ports, and distinct registers
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); ra2 = 5'(i);
      #1 expect_both("same register on both ports");
      ra2 = 5'(31 - i);
      #1 expect_both("two registers");
    end
    // $0 written with a nonzero value still reads zero
    @(negedge clk);
    we3 = 1; wa3 = 5'd0; wd3 = 32'hffffffff;
    @(negedge clk);
    we3 = 0; ra1 = 0; ra2 = 0;
    #1 expect_both("register 0");
    // random traffic
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we3 = $urandom_range(1); wa3 = 5'($urandom); wd3 = $urandom;
      ra1 = 5'($urandom); ra2 = 5'($urandom);
      #1 expect_both("read before edge");
      if (we3) model[wa3] = wd3;
    end
    @(negedge clk);
    we3 = 0;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); ra2 = 5'((i + 7) % 32);
      #1 expect_both("final readback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
