// dmem_tb: writes random words to all 16 locations of the data memory,
// checks that a write lands only on the rising edge (read data unchanged
// before it), that reads are combinational, that we=0 writes nothing, and
// that each word is kept independently of the others.
module dmem_tb;
  logic clk = 0, we;
  logic [3:0]  a;
  logic [31:0] wd, rd;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  dmem dut (.clk(clk), .we(we), .a(a), .wd(wd), .rd(rd));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_rd(logic [31:0] e, string what);
    checks++;
    if (rd !== e) begin
      failures++;
      $display("FAIL %s at %0d: rd=%h expected %h", what, a, rd, e);
    end
  endtask

  initial begin
    we = 0; a = 0; wd = 0;
    // fill every word
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      we = 1; a = 4'(i); wd = $urandom; model[i] = wd;
      @(negedge clk);
      we = 0;
      #1 expect_rd(model[i], "write then read");
    end
    // read back all words combinationally
    for (int i = 15; i >= 0; i--) begin
      a = 4'(i);
      #1 expect_rd(model[i], "readback");
    end
    // we=0 must not write
    @(negedge clk);
    a = 4'd7; wd = ~model[7]; we = 0;
    @(negedge clk);
    expect_rd(model[7], "no write when we=0");
    // data appears only after the edge
    we = 1; a = 4'd3; wd = 32'hcafef00d;
    #1 expect_rd(model[3], "old data before edge");
    @(negedge clk);
    we = 0; model[3] = 32'hcafef00d;
    expect_rd(model[3], "new data after edge");
    // random traffic
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      a = 4'($urandom); we = $urandom_range(1); wd = $urandom;
      #1 expect_rd(model[a], "random read");
      if (we) model[a] = wd;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < 16; i++) begin
      a = 4'(i);
      #1 expect_rd(model[i], "final readback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
