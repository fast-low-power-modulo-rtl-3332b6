// mod2n1_pkg: shared types and elaboration-time helpers for the modulo 2^n+1
// squarer and multiplier.
//
// Three groups of functions live here, all evaluated while the design is
// elaborated (none of them becomes hardware on its own):
//
//  * carry-merge helpers used by the sparse-tree inverted end-around-carry
//    adder: (g,p) o (g',p') = (g | p&g', p&p').
//
//  * the partial-product term tables. A term is encoded as an int
//      INV*100000 + TYPE*10000 + I*100 + J
//    meaning "x_I AND y_J" (TYPE 0), or one of the three OR-merged terms of
//    the modified matrix (TYPE 1..3), complemented when INV is set. The
//    multiplier uses the n x n matrix directly; the squarer additionally
//    replaces m pairs of equal terms per column by a single term one column to
//    the left (the pair leaving column n-1 wraps complemented into column 0).
//    m = (n-3)/2 for odd n and (n-4)/2 for even n, which leaves every column
//    with the same height n-m.
//
//  * the compressor schedule of one reduction column. Every column of the
//    reduction ring is identical, so one greedy plan serves all of them: at
//    each stage the widest compressor that the available bits can fill is used
//    (7:2 takes 9 bits, 5:2 takes 7, 4:2 takes 5, 3:2 takes 3), the inputs
//    being the previous stage's sum first, then unused partial-product bits,
//    then carries received from lower columns, oldest first. A carry produced
//    at stage t is only consumed at a later stage, so the ring has no
//    combinational loop. The column is done when two bits remain.
//    The preference order and the 9-row and 17-row results (7:2,3:2,3:2 and
//    7:2,7:2,5:2,3:2,3:2) follow the document; the greedy rule itself is this
//    design's way of reaching them for any n.
package mod2n1_pkg;

  // ---------------------------------------------------------------- compressors
  typedef enum int {
    CMP_NONE = 0,
    CMP_3_2  = 1,   // 3 inputs  -> sum, 1 carry (x2)
    CMP_4_2  = 2,   // 4+cin     -> sum, carry, cout (both x2)
    CMP_5_2  = 3,   // 5+2 cin   -> sum, carry, cout1, cout2 (all x2)
    CMP_7_2  = 4    // 7+2 cin   -> sum, carry (x2), cout1 (x2), cout2 (x4)
  } comp_e;

  function automatic int comp_width(comp_e t);
    case (t)
      CMP_3_2: return 3;
      CMP_4_2: return 5;
      CMP_5_2: return 7;
      CMP_7_2: return 9;
      default: return 0;
    endcase
  endfunction

  function automatic int comp_ncarry(comp_e t);
    case (t)
      CMP_3_2: return 1;
      CMP_4_2: return 2;
      CMP_5_2: return 3;
      CMP_7_2: return 3;
      default: return 0;
    endcase
  endfunction

  // Source codes returned by sched():
  //   0..999            partial-product row r of this column
  //   SRC_SUM  + t      sum output of stage t of this column
  //   SRC_C1   + 4t+k   carry k of stage t of the column one below
  //   SRC_C2   + 4t+k   carry k (weight x4) of stage t two columns below
  localparam int SRC_SUM = 1000;
  localparam int SRC_C1  = 2000;
  localparam int SRC_C2  = 3000;
  localparam int MAX_POOL = 128;

  // Greedy compressor plan for a column of R rows.
  //   qt = -1          : returns the number of compressor stages
  //   qpin = -1        : returns the comp_e of stage qt (CMP_NONE past the end)
  //   otherwise        : returns the source code of input pin qpin of stage qt;
  //                      for qt = number of stages, pins 0 and 1 are the two
  //                      bits that leave the column as sum and carry vectors.
  function automatic int sched(int R, bit use7, int qt, int qpin);
    int    pool [MAX_POOL];
    int    np;
    int    pins [9];
    int    k, w, a, t, i;
    bit    have_s;
    comp_e typ;
    np = 0;
    for (i = 0; i < R && i < MAX_POOL; i++) begin
      pool[np] = i;
      np++;
    end
    have_s = 1'b0;
    for (t = 0; t < MAX_POOL; t++) begin
      a = np + int'(have_s);
      if (a <= 2) begin
        if (qt == -1) return t;
        if (qt != t || qpin == -1) return int'(CMP_NONE);
        k = 0;
        if (have_s) begin
          pins[k] = SRC_SUM + t - 1;
          k++;
        end
        for (i = 0; i < np && k < 2; i++) begin
          pins[k] = pool[i];
          k++;
        end
        return (qpin < k) ? pins[qpin] : -1;
      end
      if (use7 && a >= 9)  typ = CMP_7_2;
      else if (a >= 7)     typ = CMP_5_2;
      else if (a >= 5)     typ = CMP_4_2;
      else                 typ = CMP_3_2;
      w = comp_width(typ);
      k = 0;
      if (have_s) begin
        pins[k] = SRC_SUM + t - 1;
        k++;
      end
      while (k < w) begin
        pins[k] = pool[0];
        k++;
        for (i = 0; i + 1 < np; i++) pool[i] = pool[i+1];
        np--;
      end
      if (qt == t) return (qpin == -1) ? int'(typ) : pins[qpin];
      have_s = 1'b1;
      for (i = 0; i < comp_ncarry(typ); i++) begin
        pool[np] = ((typ == CMP_7_2) && (i == 2)) ? SRC_C2 + 4*t + i : SRC_C1 + 4*t + i;
        np++;
      end
    end
    return -1;
  endfunction

  // ------------------------------------------------------ partial-product terms
  localparam int T_PLAIN   = 0;  // x_I & y_J
  localparam int T_OR_Q    = 1;  // (x_{n-1} & y_J) | q_{J-1}
  localparam int T_OR_QN1  = 2;  // (x_{n-1} & y_0) | q_{n-1}
  localparam int T_OR_P00  = 3;  // (x_0 & y_0) | q_{n-1} | (x_n & y_n)

  function automatic int term_enc(bit inv, int typ, int i, int j);
    return int'(inv) * 100000 + typ * 10000 + i * 100 + j;
  endfunction

  function automatic bit term_inv(int code); return (code / 100000) != 0;  endfunction
  function automatic int term_typ(int code); return (code / 10000) % 10;   endfunction
  function automatic int term_i  (int code); return (code / 100) % 100;    endfunction
  function automatic int term_j  (int code); return code % 100;            endfunction

  // Row index I of the entry of row j that sits in column c of the n x n matrix.
  function automatic int mat_i(int n, int c, int j);
    return ((c - j) % n + n) % n;
  endfunction

  // Entry (row j, column c) of the final n x n partial-product matrix.
  // Bits whose weight 2^(i+j) is 2^n or more were moved to weight 2^(i+j-n)
  // and complemented.
  function automatic int mat_term(int n, int c, int j);
    int i;
    i = mat_i(n, c, j);
    if (j == 0 && c == 0)     return term_enc(1'b0, T_OR_P00, 0, 0);
    if (j == 0 && c == n - 1) return term_enc(1'b0, T_OR_QN1, n - 1, 0);
    if (j >= 1 && c == j - 1) return term_enc(1'b1, T_OR_Q, n - 1, j);
    return term_enc((i + j) >= n, T_PLAIN, i, j);
  endfunction

  function automatic bit mat_plain(int n, int c, int j);
    return term_typ(mat_term(n, c, j)) == T_PLAIN;
  endfunction

  // Pairs of equal squarer terms moved one column left, per column.
  function automatic int sq_pairs(int n);
    return (n >= 3) ? (n - 3) / 2 : 0;
  endfunction

  // Squarer rows including the constant row.
  function automatic int sq_rows(int n);
    return n - sq_pairs(n) + 1;
  endfunction

  // Is row j of column c a member of one of the pairs moved out of column c?
  // Pairs are taken in ascending order of their lower row.
  function automatic bit sq_sel(int n, int c, int j);
    int cnt, jj, ii;
    cnt = 0;
    for (jj = 0; jj < n; jj++) begin
      ii = mat_i(n, c, jj);
      if (ii > jj && mat_plain(n, c, jj) && mat_plain(n, c, ii)) begin
        if (cnt < sq_pairs(n) && (jj == j || ii == j)) return 1'b1;
        cnt++;
      end
    end
    return 1'b0;
  endfunction

  // Term r (0 .. n-m-1) of column c of the squarer matrix after pair moving.
  function automatic int sq_term(int n, int c, int r);
    int k, j, cp, ii, code;
    k = 0;
    for (j = 0; j < n; j++) begin
      if (!sq_sel(n, c, j)) begin
        if (k == r) return mat_term(n, c, j);
        k++;
      end
    end
    cp = (c == 0) ? n - 1 : c - 1;
    for (j = 0; j < n; j++) begin
      ii = mat_i(n, cp, j);
      if (ii > j && sq_sel(n, cp, j)) begin
        if (k == r) begin
          code = mat_term(n, cp, j);
          // leaving column n-1 means weight 2^n: -t = ~t + 2^n (mod 2^n+1)
          if (c == 0) code = term_inv(code) ? code - 100000 : code + 100000;
          return code;
        end
        k++;
      end
    end
    return -1;
  endfunction

  // -------------------------------------------------------------- carry merge
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // (g_hi,p_hi) o (g_lo,p_lo)
  function automatic gp_t cmerge(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
