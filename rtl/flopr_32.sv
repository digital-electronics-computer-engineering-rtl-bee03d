// flopr_32: WIDTH-bit register with asynchronous active-high reset to 0; it
// holds the PC. q takes d on each rising clk edge while reset is low.
// Asynchronous reset is this design's choice.
module flopr_32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or posedge reset) begin
    if (reset) q <= '0;
    else       q <= d;
  end
endmodule
