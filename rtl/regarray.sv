// regarray: dual-ported register array of NREGS x WIDTH bits, one copy of the
// register file. Port 1 writes wd to register wa at the rising clk edge when
// we is high; port 2 reads register ra asynchronously. It behaves like an
// FPGA distributed dual-port RAM. No reset.
module regarray #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] wa,
  input  logic [WIDTH-1:0]         wd,
  input  logic [$clog2(NREGS)-1:0] ra,
  output logic [WIDTH-1:0]         rd
);
  logic [WIDTH-1:0] mem [NREGS];

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
  end

  assign rd = mem[ra];
endmodule
