// dbox_tb: stores and loads through the dbox by byte address. It checks that
// only address bits [5:2] select a word (an address 64 bytes higher, or with
// low bits set, hits the same word), that the 16 words are distinct, and
// that memwrite=0 leaves memory unchanged.
module dbox_tb;
  logic clk = 0, memwrite;
  logic [31:0] aluresult, writedata, readdata;
  logic [31:0] model [16];
  int checks = 0, failures = 0;

  dbox dut (.clk(clk), .memwrite(memwrite), .aluresult(aluresult),
            .writedata(writedata), .readdata(readdata));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic store(logic [31:0] addr, logic [31:0] data);
    @(negedge clk);
    memwrite = 1; aluresult = addr; writedata = data;
    @(negedge clk);
    memwrite = 0;
    model[addr[5:2]] = data;
  endtask

  task automatic load_check(logic [31:0] addr);
    aluresult = addr;
    #1;
    checks++;
    if (readdata !== model[addr[5:2]]) begin
      failures++;
      $display("FAIL load %h = %h expected %h", addr, readdata, model[addr[5:2]]);
    end
  endtask

  initial begin
    memwrite = 0; aluresult = 0; writedata = 0;
    for (int i = 0; i < 16; i++) store(32'(4 * i), 32'h1000_0000 + 32'(i * 17));
    for (int i = 0; i < 16; i++) load_check(32'(4 * i));
    // aliasing: higher bits and byte offset ignored
    load_check(32'h0000_0044);   // word 1
    load_check(32'h8000_003c);   // word 15
    load_check(32'h0000_0013);   // word 4
    store(32'h0000_0054, 32'h0000000d);   // word 5
    load_check(32'h0000_0014);
    // no write with memwrite low
    @(negedge clk);
    aluresult = 32'h8; writedata = 32'hffffffff; memwrite = 0;
    @(negedge clk);
    load_check(32'h8);
    for (int n = 0; n < 200; n++) begin
      if ($urandom_range(1)) store($urandom, $urandom);
      else load_check($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
