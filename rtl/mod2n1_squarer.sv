// mod2n1_squarer: modulo 2^n+1 squarer, r = x^2 mod (2^n+1).
//
// x and r are (n+1)-bit weighted numbers in 0..2^n (x[n] is set only for
// x = 2^n; larger inputs are outside the function). No conversion to or from
// the diminished-1 representation is needed.
//
// Three stages, all combinational (result valid one propagation delay after x
// changes, no clock):
//  1. sqr_ppg forms n-m partial-product rows (equal pairs of terms already
//     folded into the next column) plus the constant row 2;
//  2. ppr_ring reduces them with 7:2/5:2/4:2/3:2 compressor columns whose
//     carries out of bit n-1 re-enter bit 0 inverted, leaving a sum and a
//     carry vector;
//  3. sparse_ieac_adder adds the two vectors plus 1 modulo 2^n+1 with an
//     inverted end-around carry.
// The three corrections (moved bits, wrapped carries, wrapped pairs) and the
// constants 2 + 1 add up to 0 modulo 2^n+1 for every n, which is the
// document's result that the squarer needs the same constant 3 as the
// multiplier. N = 7 is the document's worked implementation (one 4:2 and two
// 3:2 compressors per column, six rows).
module mod2n1_squarer #(
  parameter int unsigned N = 7
) (
  input  logic [N:0] x,
  output logic [N:0] r
);
  localparam int R = mod2n1_pkg::sq_rows(N);

  logic [N-1:0] pp [R];
  logic [N-1:0] sv, cv;

  sqr_ppg #(.N(N)) u_ppg (
    .x (x),
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
