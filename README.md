# Fused add-multiply operator with sum-to-Modified-Booth recoding

This RTL computes `Z = X * (A + B)` in one combinational block. The obvious
approach adds A and B in a carry-propagate adder and then feeds the sum to a
Booth multiplier. That puts two carry-propagate adders in series on the
critical path. Here the sum is never formed. A and B are recoded straight into
the radix-4 Modified Booth (MB) digits of their sum, and those digits drive an
ordinary Booth multiplier. The only carry-propagate adder left is the one at
the end of the multiplier.

```
 A, B ──► smb_recoder ──one/two/sign (K digits)──► pp_gen ──pp[0..K-1], ct──► csa_tree ──S, C──► cla_adder ──► Z
 X ──────────────────────────────────────────────────┘
```

With the default `N = 8`, A, B and X are 8-bit two's complement numbers. There
are K = 4 MB digits, and Z is a 16-bit two's complement number.

## Files

| file | module | role |
|---|---|---|
| `rtl/fam_pkg.sv` | package | width helpers: `mb_digits`, `even_width`, `prod_width` |
| `rtl/smb_recoder.sv` | `smb_recoder` | A, B → MB digits of A+B (S-MB recoder) |
| `rtl/pp_gen.sv` | `pp_gen` | digits × X → partial products and correction term |
| `rtl/csa.sv` | `csa` | one row of 3:2 carry-save adders |
| `rtl/csa_tree.sv` | `csa_tree` | Wallace-style reduction of the partial products to S, C |
| `rtl/cla_adder.sv` | `cla_adder` | two-level carry look-ahead adder for S + C |
| `rtl/fam_top.sv` | `fam_top` | the complete operator |

## Recoding a sum into Booth digits (the hard part)

An MB digit of a number Y is `d_j = -2·y(2j+1) + y(2j) + y(2j-1)`, with values
-2 to +2 and weight 4^j. Computed from Y, this needs every bit of Y, so a full
carry chain comes first. `smb_recoder` gets the same kind of digits from A and
B in two stages of constant depth.

1. **Half adders.** Each bit position i gives `s_i = a_i ^ b_i` and
   `c_(i+1) = a_i & b_i`, so `A + B = S + C`. A half adder never sets both its
   sum and its carry. So for each pair, `s_2j + 2·c_(2j+1)` is at most 2.
2. **Pair transfer.** Bit pair j holds `q_j = s_2j + c_2j + 2·(s_(2j+1) + c_(2j+1))`,
   which is between 0 and 5. It is split as `q_j = 4·t_(j+1) + w_j` with
   `t_(j+1) = (q_j ≥ 2)`, so w_j lies in [-2, 1]. The digit is
   `d_j = w_j + t_j`, which lies in [-2, 2]. t_(j+1) depends only on pair j, so
   nothing ripples.

The top pair holds the sign. Its upper bit has weight -2^(2K-1), and the carry
out of its half adder has weight -2^(2K). Its digit is
`d = s + c + 2c' - 2s' - 4c_2K + t`.

The digits are not always the textbook Booth digits of A+B, because they depend
on A and B separately. They always add up to the same value, and the
multiplier does not care which valid digits it gets. For the example sums
5+11 and 1+11 they match the standard encoding.

Each digit leaves the recoder as three select bits:

| digit | one | two | sign |
|---|---|---|---|
| 0 | 0 | 0 | 0 |
| +1 / -1 | 1 | 0 | 0 / 1 |
| +2 / -2 | 0 | 1 | 0 / 1 |

### Width, sign and overflow

- **Even N.** The sum is treated as an N-bit number, with K = N/2 digits. The
  digits, and so Z, are exact whenever A + B fits in N bits. If it does not,
  the top digit is taken modulo 4. Then only the low N bits of Z equal
  X·(A+B). If you need exact results for every input, use an odd N, or widen
  the operands by one bit.
- **Odd N.** The operands are sign-extended by one bit before recoding. The sum
  always fits, so the result is exact for every input. For example, N = 7 uses
  4 digits and a 16-bit Z.

## Partial products and the correction term

For digit j, `pp_gen` first sign-extends X to ZW = 2·NE bits (NE is N rounded
up to even). It doubles X if `two` is set, zeroes it for a zero digit, and
inverts it (one's complement) if `sign` is set. Then it shifts the word left by
2j. The +1 that would complete each negative (two's complement) partial
product is not added there. It goes into a separate word `ct`, with bit 2j set
for each negative digit. In the 8-bit operator, `ct` is the fifth input of the
CSA tree. For example, digit -1 with X = 12 gives
`pp[1] = 1111111111001100` and `ct = 0000000000000100`. The partial products
are fully sign-extended; no sign-extension compression is used.

## Reduction and final addition

`csa_tree` groups its input words in threes. Each group goes to a `csa` row,
and the row's carry word is shifted left by one. Words left over at a level go
straight to the next level. The 8-bit operator's five words reduce
5 → 4 → 3 → 2 in three full-adder delays. All words are ZW bits wide, and the
arithmetic is modulo 2^ZW. That is correct for a two's complement result.

`cla_adder` forms, for every bit, a generate `g = a & b` and a propagate
`p = a ^ b`. It works in groups of 4 bits. A look-ahead unit computes all group
carries at once from the group generate and propagate signals. Inside each
group, the bit carries are again computed at once from the group's carry in.
Each look-ahead is the recursion `c(i+1) = g_i | p_i·c_i` written out as a flat
sum of products. The operator ties `cin` to 0. It brings the adder's carry out
to the port `cout`. `cout` has no arithmetic meaning for a two's complement
result and is there only for observation.

## Interface and timing of `fam_top`

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | N | addends, two's complement |
| `x` | in | N | multiplicand, two's complement |
| `z` | out | 2·NE | product X·(A+B), two's complement |
| `cout` | out | 1 | raw carry out of the final adder |

The operator has no clock, registers or reset. Z is valid one combinational
delay after the inputs settle. Put registers around it, or pipeline it between
the CSA tree and the CLA adder, to suit your clock. The only parameter is `N`.
The partial-product width and digit count follow from it. `cla_adder` requires
its width to be a multiple of its group size, and `prod_width` is always a
multiple of 4.

## How it departs from a textbook or reference implementation

- The recoder is the simple half-adder/transfer scheme above. It is not a
  gate-optimised S-MB cell library. It has the same function and constant
  depth, but its gate count has not been optimised.
- An adder that replaces both the CSA tree and the CLA with one "hybrid"
  structure has been proposed for this operator. It is not included, because
  its structure is not specified. The operator uses a standard CSA tree and a
  CLA.
- Behaviour when A + B overflows an even N is this design's own choice (see
  above).

## Verification

Every testbench checks the block's outputs against integer arithmetic done in
the testbench. Each one prints `TB_RESULT checks=<n> failures=<m>` and has a
watchdog.

| testbench | covers |
|---|---|
| `tb/tb_smb_recoder.sv` | all 2^16 (A, B) pairs at N = 8 and all 2^14 at N = 7: digit form and value |
| `tb/tb_pp_gen.sv` | all 256 X × 625 digit vectors: each partial product, `ct` and the total |
| `tb/tb_csa.sv` | random and corner words, sum identity and bitwise truth table |
| `tb/tb_csa_tree.sv` | 3-, 5- and 7-input trees, random and corner words |
| `tb/tb_cla_adder.sv` | all 8-bit pairs with both carry-ins; 16-bit carry-chain patterns and random words |
| `tb/tb_fam_top.sv` | N = 8 and N = 7 operators: all (A, B) for 12 values of X, the four example operand sets, and counts of each mechanism (every digit value, negative partial products, overflowing sums, odd-width wide sums, final carry out) |
| `tb/tb_fam_full.sv` | all 2^24 (A, B, X) triples on the default operator (about 6 s) |

Example operand sets checked: (26+11)·7 = 259, (26+1)·7 = 189,
(5+11)·12 = 192 and (1+11)·12 = 144.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/fam_pkg.sv tb/tb_fam_top.sv --top-module tb_fam_top
./obj_dir/Vtb_fam_top
```
