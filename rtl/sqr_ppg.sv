// sqr_ppg: partial-product generation of the modulo 2^n+1 squarer.
//
// Input x is an (n+1)-bit weighted number in 0..2^n; x[n] is set only for
// x = 2^n. The output is R = n - m + 1 partial-product rows of n bits each
// (row r, bit c has weight 2^c), where m = (n-3)/2 for odd n, (n-4)/2 for
// even n. Their sum plus the correction the rest of the squarer adds is
// x^2 mod 2^n+1:
//   sum(rows) + (R-2)*2^n + 1 == x^2   (mod 2^n+1)
//
// How the rows are formed (all from the document):
//  * the n x n matrix of p(i,j) = x_i x_j, where a bit of weight 2^(i+j) >= 2^n
//    is moved to weight 2^(i+j-n) and complemented;
//  * the terms that involve x_n (x_n x_k and x_n x_n) are ORed into matrix
//    terms of the same column, since they are non-zero only when all other
//    terms are zero; p(k,k) = x_k;
//  * in every column, m pairs of equal terms p(i,j), p(j,i) become one term
//    in the next column up; a pair leaving column n-1 enters column 0
//    complemented;
//  * the last row is the constant 2, the part of the total correction 3 that
//    is added in the reduction (the remaining 1 is absorbed by the final
//    inverted end-around-carry adder).
// Which of the available pairs are moved (lowest row first) and the order of
// terms within a column are this design's choice; for n = 7 they reproduce
// the document's example matrix up to row order. Combinational: AND, OR and
// NOT gates only, at most three gate levels.
module sqr_ppg #(
  parameter int unsigned N = 7,
  localparam int R = mod2n1_pkg::sq_rows(N)
) (
  input  logic [N:0]   x,
  output logic [N-1:0] pp [R]
);
  import mod2n1_pkg::*;

  localparam int H = R - 1;   // rows holding x-dependent terms

  // p(i,j) = x_i x_j, with p(k,k) = x_k
  function automatic logic p(input logic [N:0] v, input int i, input int j);
    return (i == j) ? v[i] : (v[i] & v[j]);
  endfunction

  for (genvar c = 0; c < N; c++) begin : g_col
    for (genvar r = 0; r < H; r++) begin : g_row
      localparam int CODE = sq_term(N, c, r);
      localparam int TYP  = term_typ(CODE);
      localparam int TI   = term_i(CODE);
      localparam int TJ   = term_j(CODE);
      localparam bit INV  = term_inv(CODE);
      logic t;
      if (TYP == T_OR_Q) begin : g_orq
        assign t = p(x, N-1, TJ) | p(x, N, TJ-1);
      end else if (TYP == T_OR_QN1) begin : g_orqn
        assign t = p(x, N-1, 0) | p(x, N, N-1);
      end else if (TYP == T_OR_P00) begin : g_orp00
        assign t = x[0] | p(x, N, N-1) | x[N];
      end else begin : g_plain
        assign t = p(x, TI, TJ);
      end
      assign pp[r][c] = INV ? ~t : t;
    end
    // constant row: 2
    assign pp[H][c] = (c == 1);
  end
endmodule
