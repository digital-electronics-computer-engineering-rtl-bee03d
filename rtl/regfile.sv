// regfile: the processor's register file, two read ports and one write port.
// An FPGA dual-port RAM offers only one read beside its write port, so the
// file is two regarray copies: every write goes to both, copy 1 answers ra1
// and copy 2 answers ra2. This doubles the storage, as the duplicated
// arrangement intends. Register 0 always reads as 0 (this design forces the
// read data to 0 for address 0). Writes at the rising clk edge when we3 is
// high; reads are combinational.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic                     we3,
  input  logic [$clog2(NREGS)-1:0] ra1,
  input  logic [$clog2(NREGS)-1:0] ra2,
  input  logic [$clog2(NREGS)-1:0] wa3,
  input  logic [WIDTH-1:0]         wd3,
  output logic [WIDTH-1:0]         rd1,
  output logic [WIDTH-1:0]         rd2
);
  logic [WIDTH-1:0] q1, q2;

  regarray #(.NREGS(NREGS), .WIDTH(WIDTH)) u_copy1 (
    .clk(clk), .we(we3), .wa(wa3), .wd(wd3), .ra(ra1), .rd(q1)
  );
  regarray #(.NREGS(NREGS), .WIDTH(WIDTH)) u_copy2 (
    .clk(clk), .we(we3), .wa(wa3), .wd(wd3), .ra(ra2), .rd(q2)
  );

  assign rd1 = (ra1 == '0) ? '0 : q1;
  assign rd2 = (ra2 == '0) ? '0 : q2;
endmodule
