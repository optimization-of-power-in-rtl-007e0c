// csa: one row of 3:2 carry-save adders (full adders side by side).
//
// Adds three W-bit words without propagating carries. It returns a word of
// sum bits s and a word of carry bits cy, both W bits wide: bit i of cy is the
// carry produced at position i and carries weight 2^(i+1), so
// a + b + c = s + 2*cy. Aligning cy (shifting it left) is left to the caller.
// Purely combinational; one full-adder delay.
module csa #(
  parameter int W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  assign s  = a ^ b ^ c;
  assign cy = (a & b) | (a & c) | (b & c);

endmodule
