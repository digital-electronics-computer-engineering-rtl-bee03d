// fulladd: one-bit full adder, the cell the ALU slices are built from.
// s = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational.
module fulladd (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
