// mod2n1_multiplier: modulo 2^n+1 multiplier, r = x*y mod (2^n+1).
//
// x, y and r are (n+1)-bit weighted numbers in 0..2^n. With x[n] = y[n] = 0
// and n = 16 this is the multiplication of the IDEA cipher on 16-bit words
// (there 0 stands for 2^16 only if the caller maps it so).
//
// Same three combinational stages as the squarer: mul_ppg forms the n x n
// matrix plus the constant 2 (n+1 rows), ppr_ring reduces them with
// compressor columns and inverted end-around carries (n-1 wrapped carries),
// and sparse_ieac_adder adds sum and carry vectors plus 1 modulo 2^n+1. For
// n = 8 each column is a 7:2 and two 3:2 compressors, for n = 16 two 7:2, a
// 5:2 and two 3:2, as the document describes. Combinational, no clock.
module mod2n1_multiplier #(
  parameter int unsigned N = 7
) (
  input  logic [N:0] x,
  input  logic [N:0] y,
  output logic [N:0] r
);
  localparam int R = N + 1;

  logic [N-1:0] pp [R];
  logic [N-1:0] sv, cv;

  mul_ppg #(.N(N)) u_ppg (
    .x (x),
    .y (y),
    .pp(pp)
  );

  ppr_ring #(.N(N), .R(R)) u_ppr (
    .pp     (pp),
    .sum_o  (sv),
    .carry_o(cv)
  );

  sparse_ieac_adder #(.WIDTH(N), .K(4)) u_fsa (
    .a(sv),
    .b(cv),
    .r(r)
  );
endmodule
