// dmem: data memory, DEPTH words of WIDTH bits (16 x 32). Writes happen on the
// rising clk edge when we is high; the read port is asynchronous and always
// enabled, so the word at a appears on rd in the same cycle, as the
// single-cycle datapath needs. No reset, no initial contents.
module dmem #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] a,
  input  logic [WIDTH-1:0]         wd,
  output logic [WIDTH-1:0]         rd
);
  logic [WIDTH-1:0] ram [DEPTH];

  always_ff @(posedge clk) begin
    if (we) ram[a] <= wd;
  end

  assign rd = ram[a];
endmodule
