// mul_ppg: partial-product generation of the modulo 2^n+1 multiplier.
//
// Inputs x and y are (n+1)-bit weighted numbers in 0..2^n. The output is
// R = n + 1 rows of n bits (row r, bit c has weight 2^c): the n x n matrix
// and the constant 2. They satisfy
//   sum(rows) + (n-1)*2^n + 1 == x*y   (mod 2^n+1)
// where the reduction adds the (n-1)*2^n and the final adder the 1.
//
// The matrix is the document's: p(i,j) = x_i y_j; bits of weight 2^(i+j) >= 2^n
// move down by n places, complemented; q_k = x_n y_k | x_k y_n is ORed with
// p(n-1,k+1) (complemented, column k), q_{n-1} with p(n-1,0) in column n-1 and
// with p(0,0) in column 0, and p(n,n) = x_n y_n also with p(0,0). These ORs are
// exact because only one group of terms can be non-zero for any input pair.
// Combinational, at most three gate levels.
module mul_ppg #(
  parameter int unsigned N = 7,
  localparam int R = N + 1
) (
  input  logic [N:0]   x,
  input  logic [N:0]   y,
  output logic [N-1:0] pp [R]
);
  import mod2n1_pkg::*;

  logic [N-1:0] q;
  always_comb begin
    for (int k = 0; k < N; k++) q[k] = (x[N] & y[k]) | (x[k] & y[N]);
  end

  for (genvar c = 0; c < N; c++) begin : g_col
    for (genvar r = 0; r < N; r++) begin : g_row
      localparam int CODE = mat_term(N, c, r);
      localparam int TYP  = term_typ(CODE);
      localparam int TI   = term_i(CODE);
      localparam int TJ   = term_j(CODE);
      localparam bit INV  = term_inv(CODE);
      logic t;
      if (TYP == T_OR_Q) begin : g_orq
        assign t = (x[N-1] & y[TJ]) | q[TJ-1];
      end else if (TYP == T_OR_QN1) begin : g_orqn
        assign t = (x[N-1] & y[0]) | q[N-1];
      end else if (TYP == T_OR_P00) begin : g_orp00
        assign t = (x[0] & y[0]) | q[N-1] | (x[N] & y[N]);
      end else begin : g_plain
        assign t = x[TI] & y[TJ];
      end
      assign pp[r][c] = INV ? ~t : t;
    end
    assign pp[N][c] = (c == 1);
  end
endmodule
