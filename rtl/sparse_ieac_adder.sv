// sparse_ieac_adder: sparse-tree inverted end-around-carry adder, the final
// stage of the modulo 2^n+1 multiplier and squarer.
//
// Computes r = |a + b + 1| mod 2^n+1 for n-bit a, b, as
//   r[n-1:0] = |a + b + ~cout| mod 2^n,   cout = carry out of a + b,
//   r[n]     = 1 exactly when a and b are bitwise complementary
// (then a + b + 1 = 2^n and the low bits are 0). The result is in 0..2^n.
//
// Structure, after the document: per-bit generate g = a&b and propagate
// p = a|b; carry-merge cells (g,p)o(g',p') = (g | p g', p p') build the group
// (G,P) of every K-bit block, and a prefix and a suffix tree over the blocks
// give G[hi:0] and G[n-1:lo]. Only every K-th carry is formed:
//   C*(-1)     = ~G[n-1:0]                        (into bit 0)
//   C*(kK-1)   = (G,P)[kK-1:0] o ~(G,P)[n-1:kK]
// the latter in the inverted form ~((~P',~G)[kK-1:0] o (G,P)[n-1:kK]) that the
// document uses to stay within log2 n levels. Here P' = G | P: with OR
// propagates a group can generate without propagating (P = 0, G = 1), and the
// inverted form is only exact when G implies the propagate term. Each K-bit block then gets its
// sum from a conditional sum generator (csg) selected by its sparse carry.
// The output MSB uses the XOR half sums (all ones means complementary
// operands); the document calls it the group propagate, which with OR
// propagates would also be set for a = b = all ones, so the half sums are
// used. The block prefix/suffix trees are Kogge-Stone style, this design's
// choice for n other than 16; K = 4 is the document's. Combinational.
module sparse_ieac_adder #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned K     = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH:0]   r
);
  import mod2n1_pkg::*;

  localparam int NB = (WIDTH + K - 1) / K;   // number of blocks

  logic [WIDTH-1:0] g, p, h;
  gp_t              blk  [NB];   // group (G,P) of each block
  gp_t              pre  [NB];   // (G,P)[top of block b : 0]
  gp_t              suf  [NB];   // (G,P)[n-1 : bottom of block b]
  logic [NB-1:0]    cstar;       // carry into each block

  assign g = a & b;
  assign p = a | b;
  assign h = a ^ b;

  // group generate/propagate of each block
  always_comb begin
    for (int bl = 0; bl < NB; bl++) begin
      blk[bl].g = 1'b0;
      blk[bl].p = 1'b1;
      for (int i = bl * int'(K); i < (bl + 1) * int'(K) && i < int'(WIDTH); i++)
        blk[bl] = cmerge('{g: g[i], p: p[i]}, blk[bl]);
    end
  end

  // prefix (from bit 0 up) and suffix (from bit n-1 down) over the blocks
  always_comb begin
    gp_t tp [NB];
    gp_t ts [NB];
    for (int bl = 0; bl < NB; bl++) begin
      pre[bl] = blk[bl];
      suf[bl] = blk[bl];
    end
    for (int d = 1; d < NB; d = d * 2) begin
      tp = pre;
      ts = suf;
      for (int bl = 0; bl < NB; bl++) begin
        if (bl >= d)     pre[bl] = cmerge(tp[bl], tp[bl-d]);
        if (bl + d < NB) suf[bl] = cmerge(ts[bl+d], ts[bl]);
      end
    end
  end

  // sparse carries
  always_comb begin
    cstar[0] = ~pre[NB-1].g;
    for (int bl = 1; bl < NB; bl++)
      cstar[bl] = ~(~(pre[bl-1].p | pre[bl-1].g) | (~pre[bl-1].g & suf[bl].g));
  end

  for (genvar bl = 0; bl < NB; bl++) begin : g_blk
    localparam int LO = bl * K;
    localparam int KW = ((LO + K) <= WIDTH) ? K : (WIDTH - LO);
    csg #(.K(KW)) u_csg (
      .g  (g[LO +: KW]),
      .p  (p[LO +: KW]),
      .h  (h[LO +: KW]),
      .cin(cstar[bl]),
      .s  (r[LO +: KW])
    );
  end

  assign r[WIDTH] = &h;
endmodule
