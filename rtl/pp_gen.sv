// pp_gen: Modified Booth partial-product generator with its correction term.
//
// For every MB digit j (given as one/two/sign select bits) it forms the
// partial product d_j * X * 4^j as a ZW-bit word: the multiplicand X is
// sign-extended, doubled when two[j] is set, zeroed when the digit is zero,
// inverted (one's complement) when sign[j] is set, and shifted left by 2j.
// The +1 that turns each inverted word into its two's complement negative is
// not added here: it is collected in the correction term ct, which has bit 2j
// set for every negative digit. The sum of all pp words and ct, modulo 2^ZW,
// equals X * sum(d_j * 4^j).
//
// Interface: x is the N-bit two's complement multiplicand; one, two, sign
// are K-bit digit selects; pp[j] are the K partial products; ct the
// correction word. Purely combinational.
//
// The fully sign-extended, one's complement format of the partial products
// and the separate correction-term operand follow the operator this RTL
// implements; no sign-extension compression is used (this design's choice).
module pp_gen
  import fam_pkg::*;
#(
  parameter int N = 8,
  localparam int K  = mb_digits(N),
  localparam int ZW = prod_width(N)
) (
  input  logic [N-1:0]  x,
  input  logic [K-1:0]  one,
  input  logic [K-1:0]  two,
  input  logic [K-1:0]  sign,
  output logic [ZW-1:0] pp [K],
  output logic [ZW-1:0] ct
);

  logic [ZW-1:0] xe;
  assign xe = ZW'(signed'(x));

  always_comb begin
    logic [ZW-1:0] mag;
    ct = '0;
    for (int j = 0; j < K; j++) begin
      mag   = one[j] ? xe : (two[j] ? (xe << 1) : '0);
      pp[j] = (sign[j] ? ~mag : mag) << (2 * j);
      ct[2*j] = sign[j];
    end
  end

endmodule
