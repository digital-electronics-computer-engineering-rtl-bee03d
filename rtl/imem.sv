// imem: instruction memory, a DEPTH-word ROM read combinationally at a word
// address (the ibox gives PC[5:2]). Its contents come from INIT_FILE, a hex
// file of one 32-bit word per line, at elaboration; by default that is the
// Fibonacci program in rtl/fib.hex. Unlisted words read as 0 (a nop).
// A 16-word depth is this design's choice.
module imem #(
  parameter int unsigned DEPTH     = 16,
  parameter string       INIT_FILE = "rtl/fib.hex"
) (
  input  logic [$clog2(DEPTH)-1:0] a,
  output logic [31:0]              rd
);
  logic [31:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) rom[i] = 32'd0;
    $readmemh(INIT_FILE, rom);
  end

  assign rd = rom[a];
endmodule
