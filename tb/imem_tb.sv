// imem_tb: reads every word of the instruction memory with its default
// contents, the Fibonacci program. The first four words are the
// instructions the processor fetches first (addi $t0,$0,8; addi $t1,$0,-1;
// addi $t2,$0,1; beq $t0,$0,done) and the fifth is add $t3,$t1,$t2; the
// rest are checked against the hand-assembled remainder of the loop. Words
// past the program must read 0.
module imem_tb;
  logic [3:0]  a;
  logic [31:0] rd;
  int checks = 0, failures = 0;

  imem dut (.a(a), .rd(rd));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [31:0] PROG [16] = '{
    32'h20080008, 32'h2009ffff, 32'h200a0001, 32'h11000005,
    32'h012a5820, 32'h01404820, 32'h01605020, 32'h2108ffff,
    32'h1000fffa, 32'h1000ffff, 32'h0, 32'h0, 32'h0, 32'h0, 32'h0, 32'h0};

  initial begin
    for (int i = 0; i < 16; i++) begin
      a = 4'(i);
      #1;
      checks++;
      if (rd !== PROG[i]) begin
        failures++;
        $display("FAIL word %0d = %h, expected %h", i, rd, PROG[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
