// fam_top: fused add-multiply (FAM) operator, Z = X * (A + B).
//
// The sum A + B is never formed in a carry-propagate adder. An S-MB recoder
// turns A and B directly into the K Modified Booth digits of their sum; the
// partial-product generator multiplies X by each digit; a carry-save tree
// reduces the K partial products and the correction term to two words; and
// one carry look-ahead adder produces the product. The only carry-propagate
// adder on the path is the final one.
//
//   A, B --> smb_recoder --one/two/sign--> pp_gen --pp[K], ct--> csa_tree
//   X ------------------------------------^                        | s, c
//                                                     cla_adder <--+
//                                                         |
//                                                       Z, cout
//
// Interface: a, b, x are N-bit two's complement; z is the ZW = 2*NE bit two's
// complement product, where NE is N rounded up to even (16 bits for N = 8).
// cout is the raw carry out of the final adder; it has no arithmetic meaning
// for a two's complement result and is brought out for observation only.
// For odd N the result is exact for all inputs. For even N it is exact when
// A + B fits in N bits (as the sum of an add-multiply pair normally does);
// otherwise only the low N bits of z equal X * (A + B).
// Purely combinational: no clock, no registers, result valid one
// combinational delay after the inputs settle.
//
// The block structure (recoder, partial-product generator, correction term,
// CSA tree, CLA adder) and the 8-bit default follow the operator this RTL
// implements; the handling of sums that overflow is this design's choice.
module fam_top
  import fam_pkg::*;
#(
  parameter int N = 8,
  localparam int K  = mb_digits(N),
  localparam int ZW = prod_width(N)
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic [N-1:0]  x,
  output logic [ZW-1:0] z,
  output logic          cout
);

  logic [K-1:0]  one, two, sign;
  logic [ZW-1:0] pp  [K];
  logic [ZW-1:0] ops [K+1];
  logic [ZW-1:0] ct, sum_w, car_w;

  smb_recoder #(.N(N)) u_recoder (
    .a   (a),
    .b   (b),
    .one (one),
    .two (two),
    .sign(sign)
  );

  pp_gen #(.N(N)) u_ppgen (
    .x   (x),
    .one (one),
    .two (two),
    .sign(sign),
    .pp  (pp),
    .ct  (ct)
  );

  for (genvar j = 0; j < K; j++) begin : g_ops
    assign ops[j] = pp[j];
  end
  assign ops[K] = ct;

  csa_tree #(.W(ZW), .NOPS(K + 1)) u_tree (
    .ops(ops),
    .s  (sum_w),
    .c  (car_w)
  );

  cla_adder #(.W(ZW)) u_cla (
    .a   (sum_w),
    .b   (car_w),
    .cin (1'b0),
    .sum (z),
    .cout(cout)
  );

endmodule
