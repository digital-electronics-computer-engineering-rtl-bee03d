// flopr_32_tb: checks that the register loads d on the rising edge, holds
// between edges, and clears at once (without a clock edge) when reset rises.
module flopr_32_tb;
  logic clk = 0, reset;
  logic [31:0] d, q;
  int checks = 0, failures = 0;

  flopr_32 dut (.clk(clk), .reset(reset), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(logic [31:0] e, string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, e);
    end
  endtask

  initial begin
    logic [31:0] v, prev;
    reset = 1; d = 32'hdeadbeef;
    @(negedge clk);
    expect_q(32'h0, "reset");
    @(negedge clk);
    expect_q(32'h0, "reset holds over an edge");
    reset = 0;
    prev = 32'h0;
    for (int n = 0; n < 50; n++) begin
      v = $urandom;
      d = v;
      #1 expect_q(prev, "hold before edge");
      @(negedge clk);
      expect_q(v, "load");
      prev = v;
    end
    // asynchronous clear in the middle of the low phase
    d = 32'h12345678;
    #2 reset = 1;
    #1 expect_q(32'h0, "asynchronous reset");
    @(negedge clk);
    reset = 0;
    @(negedge clk);
    expect_q(32'h12345678, "load after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
