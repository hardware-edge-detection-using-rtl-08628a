// cla_adder: two-level carry lookahead adder.
//
// The edge detection pipeline reduces its nine products with 16-bit carry
// lookahead adders. This module is that adder: bits are grouped in fours,
// every carry inside a group is computed from the group's generate and
// propagate terms and the group carry-in, and the group carries are computed
// the same way from the group generate/propagate terms, so no carry ripples
// through more than the two lookahead levels. Purely combinational; the
// pipeline registers its result. The lookahead structure is this design's
// choice: the source names the adder type and width only.
//
// Ports: a, b, cin -> sum (W bits), cout.
module cla_adder #(
  parameter int unsigned W = 16   // must be a multiple of 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NG = W / 4;

  logic [W-1:0]  p, g, c;
  logic [NG-1:0] gp, gg;
  logic [NG:0]   gc;

  assign p = a ^ b;
  assign g = a & b;

  // Group generate / propagate.
  always_comb begin
    for (int unsigned k = 0; k < NG; k++) begin
      gp[k] = &p[4*k +: 4];
      gg[k] = g[4*k+3]
            | (p[4*k+3] & g[4*k+2])
            | (p[4*k+3] & p[4*k+2] & g[4*k+1])
            | (p[4*k+3] & p[4*k+2] & p[4*k+1] & g[4*k]);
    end
  end

  // Second level: group carries, each a flat sum of products.
  always_comb begin
    for (int unsigned k = 0; k <= NG; k++) begin
      logic term;
      gc[k] = 1'b0;
      for (int unsigned j = 0; j < k; j++) begin
        term = gg[j];
        for (int unsigned m = j + 1; m < k; m++) term = term & gp[m];
        gc[k] = gc[k] | term;
      end
      term = cin;
      for (int unsigned m = 0; m < k; m++) term = term & gp[m];
      gc[k] = gc[k] | term;
    end
  end

  // First level: carries inside each group from the group carry-in.
  always_comb begin
    for (int unsigned k = 0; k < NG; k++) begin
      c[4*k]   = gc[k];
      c[4*k+1] = g[4*k] | (p[4*k] & gc[k]);
      c[4*k+2] = g[4*k+1] | (p[4*k+1] & g[4*k]) | (p[4*k+1] & p[4*k] & gc[k]);
      c[4*k+3] = g[4*k+2] | (p[4*k+2] & g[4*k+1]) | (p[4*k+2] & p[4*k+1] & g[4*k])
               | (p[4*k+2] & p[4*k+1] & p[4*k] & gc[k]);
    end
  end

  assign sum  = p ^ c;
  assign cout = gc[NG];

  initial assert (W % 4 == 0) else $error("cla_adder: W must be a multiple of 4");
endmodule
