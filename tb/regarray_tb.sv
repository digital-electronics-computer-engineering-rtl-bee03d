// regarray_tb: writes all 32 registers of one register-array copy, then
// mixes writes and reads at independent addresses, checking that the read
// port is combinational, that writes land on the rising edge only and that
// we=0 writes nothing.
module regarray_tb;
  logic clk = 0, we;
  logic [4:0]  wa, ra;
  logic [31:0] wd, rd;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regarray dut (.clk(clk), .we(we), .wa(wa), .wd(wd), .ra(ra), .rd(rd));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_rd(string what);
    checks++;
    if (rd !== model[ra]) begin
      failures++;
      $display("FAIL %s: reg %0d = %h expected %h", what, ra, rd, model[ra]);
    end
  endtask

  initial begin
    we = 0; wa = 0; ra = 0; wd = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 1; wa = 5'(i); wd = $urandom; model[i] = wd;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(31 - i);
      #1 expect_rd("readback");
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = $urandom_range(1); wa = 5'($urandom); wd = $urandom; ra = 5'($urandom);
      #1 expect_rd("read before edge");
      if (we) model[wa] = wd;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i);
      #1 expect_rd("final readback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
