// csa_tree: carry-save (Wallace) reduction tree.
//
// Reduces NOPS words of W bits to two words, s and c, with s + c equal to the
// sum of all inputs modulo 2^W. Each level groups its words in threes and
// feeds every group to a csa row, which returns a sum word and a carry word
// (the carry word is shifted left by one here); the one or two words left
// over at a level pass straight to the next. A level with n words leaves
// 2*floor(n/3) + n mod 3, so the five words of the default 8-bit operator
// (four partial products and the correction term) take three levels:
// 5 -> 4 -> 3 -> 2.
//
// Interface: ops[NOPS] in, s and c out. Purely combinational. The tree
// structure follows the operator this RTL implements; the grouping order
// (words taken in index order) is this design's own choice.
module csa_tree #(
  parameter int W    = 16,
  parameter int NOPS = 5
) (
  input  logic [W-1:0] ops [NOPS],
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  // Words left after one level that starts with n words.
  function automatic int next_count(input int n);
    return 2 * (n / 3) + (n % 3);
  endfunction

  // Words present at level lvl.
  function automatic int count_at(input int n, input int lvl);
    int m = n;
    for (int i = 0; i < lvl; i++) m = next_count(m);
    return m;
  endfunction

  // Levels needed to get down to two words.
  function automatic int num_levels(input int n);
    int m = n;
    int l = 0;
    while (m > 2) begin
      m = next_count(m);
      l++;
    end
    return l;
  endfunction

  localparam int NL = num_levels(NOPS);

  if (NOPS < 3) begin : g_check
    $error("csa_tree needs at least three input words");
  end

  // One generate block per level; win are the words entering the level and
  // wout those leaving it (entries at and above the live count are zero).
  for (genvar l = 0; l < NL; l++) begin : g_lvl
    localparam int NIN  = count_at(NOPS, l);
    localparam int NOUT = count_at(NOPS, l + 1);
    localparam int NG   = NIN / 3;
    logic [W-1:0] win  [NOPS];
    logic [W-1:0] wout [NOPS];
    if (l == 0) begin : g_first
      assign win = ops;
    end else begin : g_next
      assign win = g_lvl[l-1].wout;
    end
    for (genvar g = 0; g < NG; g++) begin : g_csa
      logic [W-1:0] cy;
      csa #(.W(W)) u_csa (
        .a (win[3*g]),
        .b (win[3*g+1]),
        .c (win[3*g+2]),
        .s (wout[2*g]),
        .cy(cy)
      );
      assign wout[2*g+1] = cy << 1;
    end
    for (genvar r = 0; r < NIN % 3; r++) begin : g_pass
      assign wout[2*NG+r] = win[3*NG+r];
    end
    for (genvar u = NOUT; u < NOPS; u++) begin : g_unused
      assign wout[u] = '0;
    end
  end

  assign s = g_lvl[NL-1].wout[0];
  assign c = g_lvl[NL-1].wout[1];

endmodule
