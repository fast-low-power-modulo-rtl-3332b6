// comp4_2: MUX-based 4:2 compressor with five inputs.
//
// x1 + x2 + x3 + x4 + cin = s + 2 (c + cout). cout is the majority of x1..x3
// and does not depend on cin, so a column of these can pass cout sideways
// without a ripple. Two XOR/XNOR cells form x1^x2 and x3^x4; a MUX merges them
// into t = x1^x2^x3^x4 on both rails; a MUX selected by cin gives the sum and a
// MUX selected by t gives the carry (cin or x4). The document uses this cell
// with five same-weight inputs (four partial products plus one more bit on the
// cin pin) and states a path of one XOR/XNOR plus MUXes; the cell drawing is
// not given, so this arrangement is the common MUX-based one. Combinational.
module comp4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic s,
  output logic c,
  output logic cout
);
  logic x12, x12b, x34, t, tb;

  xor_xnor u_x12 (.a(x1), .b(x2), .o(x12), .ob(x12b));
  xor_xnor u_x34 (.a(x3), .b(x4), .o(x34), .ob());
  mux2     u_t   (.sel(x34), .d0(x12),  .d1(x12b), .o(t));
  mux2     u_tb  (.sel(x34), .d0(x12b), .d1(x12),  .o(tb));
  mux2     u_co  (.sel(x12), .d0(x1),   .d1(x3),   .o(cout));
  mux2     u_s   (.sel(cin), .d0(t),    .d1(tb),   .o(s));
  mux2     u_c   (.sel(t),   .d0(x4),   .d1(cin),  .o(c));
endmodule
