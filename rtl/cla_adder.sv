// cla_adder: two-level carry look-ahead adder.
//
// Adds a, b and cin into a W-bit sum and a carry out. Every bit gives a
// generate g_i = a_i & b_i and a propagate p_i = a_i ^ b_i, and a carry
// enters bit i+1 when c_{i+1} = g_i | (p_i & c_i). Rather than rippling this
// recursion, the bits are split into groups of GS: each group forms its own
// generate and propagate, a look-ahead unit computes all group carries at
// once from them, and inside every group the bit carries are again computed
// at once from the group's carry in. Each look-ahead is the recursion written
// out as a flat sum of products, c_{i+1} = g_i | p_i g_{i-1} | ... | p_i..p_0 c_0.
// The sum bit is p_i ^ c_i.
//
// Interface: W must be a multiple of GS. Purely combinational. Generate and
// propagate, the carry recursion and the use of the xor propagate follow the
// operator this RTL implements; the group size of 4 and the two-level
// structure are this design's own choice.
module cla_adder #(
  parameter int W  = 16,
  parameter int GS = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int NG = W / GS;

  // Flat look-ahead over n positions: returns carries r[0..n], r[0] = ci.
  function automatic logic [W:0] lookahead(input logic [W-1:0] g,
                                           input logic [W-1:0] p,
                                           input logic ci,
                                           input int n);
    logic [W:0] r;
    logic term;
    r = '0;
    r[0] = ci;
    for (int i = 0; i < n; i++) begin
      term = ci;
      for (int k = 0; k <= i; k++) term &= p[k];
      r[i+1] = term;
      for (int m = 0; m <= i; m++) begin
        term = g[m];
        for (int k = m + 1; k <= i; k++) term &= p[k];
        r[i+1] |= term;
      end
    end
    return r;
  endfunction

  logic [W-1:0]  g, p;
  logic [W-1:0]  gg, gp;   // group generate/propagate, low NG bits used
  logic [W:0]    gc;       // group carries, gc[i] enters group i
  logic [W:0]    c;        // bit carries

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    logic [W:0] r;
    gg = '0;
    gp = '0;
    for (int i = 0; i < NG; i++) begin
      r     = lookahead(W'(g >> (i * GS)), W'(p >> (i * GS)), 1'b0, GS);
      gg[i] = r[GS];
      gp[i] = &p[i*GS +: GS];
    end
  end

  assign gc = lookahead(gg, gp, cin, NG);

  always_comb begin
    logic [W:0] r;
    c = '0;
    for (int i = 0; i < NG; i++) begin
      r = lookahead(W'(g >> (i * GS)), W'(p >> (i * GS)), gc[i], GS);
      for (int k = 0; k < GS; k++) c[i*GS+k] = r[k];
    end
    c[W] = gc[NG];
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];

endmodule
