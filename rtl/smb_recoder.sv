// smb_recoder: Sum-to-Modified-Booth (S-MB) recoder.
//
// Turns two N-bit two's complement numbers A and B into the K radix-4 Modified
// Booth digits of their sum Y = A + B, without first forming Y in a
// carry-propagate adder. Each digit d_j in {-2,-1,0,+1,+2} has weight 4^j and
// is delivered as three select bits, as the multiplier's partial-product
// generator wants them: one[j] (|d_j| = 1), two[j] (|d_j| = 2) and sign[j]
// (d_j < 0). A zero digit has all three bits low.
//
// How it works (two stages, both of constant depth):
//   1. A half adder per bit position i gives s_i = a_i ^ b_i and a carry
//      c_{i+1} = a_i & b_i. Then A + B = S + C. A half adder never sets both
//      s_i and c_{i+1}, so s_{2j} + 2*c_{2j+1} is at most 2.
//   2. Bit pair j holds q_j = s_{2j} + c_{2j} + 2*(s_{2j+1} + c_{2j+1}), which
//      is at most 5. It is split as q_j = 4*t_{j+1} + w_j with t_{j+1} = (q_j >= 2),
//      so w_j is in [-2, 1]. The digit is d_j = w_j + t_j, in [-2, 2]. The
//      transfer t_{j+1} depends on pair j only, so no carry ripples.
//   The most significant pair carries the sign: its bit 2K-1 has weight
//   -2^(2K-1), and the carry out of the half adder there has weight -2^(2K).
//   Its digit is d = s + c + 2*c' - 2*s' - 4*c_{2K} + t, exact whenever the sum
//   A + B is representable in 2K bits.
//
// Range: for an odd N the operands are sign-extended by one bit, and the sum
// always fits, so every input gives the exact digits of A + B. For an even N
// the digits are exact when A + B fits in N bits; otherwise the top digit is
// taken modulo 4 (into [-2, 1]), and the digits then represent A + B modulo 2^N
// but not its wrapped two's complement value.
//
// The direct recoding of the sum into MB form, the one/two/sign digit
// encoding and support for odd and even widths follow the operator this RTL
// implements; the particular half-adder/transfer scheme above is this
// design's own choice. Purely combinational; no clock.
module smb_recoder
  import fam_pkg::*;
#(
  parameter int N = 8,
  localparam int K = mb_digits(N)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [K-1:0] one,
  output logic [K-1:0] two,
  output logic [K-1:0] sign
);

  localparam int NE = even_width(N);

  logic [NE-1:0] ae, be;   // operands sign-extended to an even width
  logic [NE-1:0] s;        // stage 1: half-adder sums
  logic [NE:0]   c;        // stage 1: half-adder carries, c[i] has weight 2^i
  logic [K:0]    t;        // stage 2: transfer from pair j-1 into pair j

  assign ae = NE'(signed'(a));
  assign be = NE'(signed'(b));

  // Stage 1: one half adder per bit.
  always_comb begin
    c[0] = 1'b0;
    for (int i = 0; i < NE; i++) begin
      s[i]   = ae[i] ^ be[i];
      c[i+1] = ae[i] & be[i];
    end
  end

  // Stage 2: pair sums, transfers and digits.
  always_comb begin
    logic signed [3:0] q;
    logic signed [3:0] d;
    t[0] = 1'b0;
    for (int j = 0; j < K; j++) begin
      if (j < K - 1) begin
        q      = 4'(s[2*j]) + 4'(c[2*j]) + 4'(2 * (int'(s[2*j+1]) + int'(c[2*j+1])));
        t[j+1] = (q >= 4'sd2);
        d      = q - (t[j+1] ? 4'sd4 : 4'sd0) + 4'(t[j]);
      end else begin
        // Most significant pair: bit 2j+1 and carry c[2j+2] are negative.
        t[j+1] = 1'b0;
        q      = 4'(s[2*j]) + 4'(c[2*j]) + 4'(2 * int'(c[2*j+1]))
               - 4'(2 * int'(s[2*j+1])) - 4'(4 * int'(c[2*j+2]));
        d      = q + 4'(t[j]);
        // Only reachable when A + B overflows N bits (even N): wrap mod 4.
        if (d > 4'sd2)       d = d - 4'sd4;
        else if (d < -4'sd2) d = d + 4'sd4;
      end
      one[j]  = (d == 4'sd1) || (d == -4'sd1);
      two[j]  = (d == 4'sd2) || (d == -4'sd2);
      sign[j] = d[3];
    end
  end

endmodule
