// comp5_2: MUX-based 5:2 compressor.
//
// x1+x2+x3+x4+x5 + cin1 + cin2 = sum + 2 (carry + cout1 + cout2).
// Built as the document draws it: a CGEN cell gives cout1 from x1..x3; an
// XOR/XNOR of x1,x2 and a MUX selected by x3 give m = x1^x2^x3 on both rails;
// an XOR/XNOR of x4,x5 steers one MUX that gives cout2 (cin1 or x4) and
// another, selected by cin1, that gives x4^x5^cin1; a MUX merges the two into
// t; the last two MUXes, on cin2, give sum and carry. Critical path: one
// XOR/XNOR and three MUXes. Which printed line reaches which data input of the
// MUXes is this design's reading of the drawing, checked against the sum
// equation. In the reduction ring cin1 and cin2 may carry ordinary
// partial-product bits, as in the document's column drawings. Combinational.
module comp5_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic x5,
  input  logic cin1,
  input  logic cin2,
  output logic sum,
  output logic carry,
  output logic cout1,
  output logic cout2
);
  logic x12, x12b, m, mb, x45, x45b, s45, t, tb;

  cgen     u_co1 (.x(x1), .y(x2), .z(x3), .c(cout1));
  xor_xnor u_x12 (.a(x1), .b(x2), .o(x12), .ob(x12b));
  mux2     u_m   (.sel(x3),   .d0(x12),  .d1(x12b), .o(m));
  mux2     u_mb  (.sel(x3),   .d0(x12b), .d1(x12),  .o(mb));
  xor_xnor u_x45 (.a(x4), .b(x5), .o(x45), .ob(x45b));
  mux2     u_co2 (.sel(x45),  .d0(x4),   .d1(cin1), .o(cout2));
  mux2     u_s45 (.sel(cin1), .d0(x45),  .d1(x45b), .o(s45));
  mux2     u_t   (.sel(s45),  .d0(m),    .d1(mb),   .o(t));
  mux2     u_tb  (.sel(s45),  .d0(mb),   .d1(m),    .o(tb));
  mux2     u_sum (.sel(cin2), .d0(t),    .d1(tb),   .o(sum));
  mux2     u_cy  (.sel(t),    .d0(m),    .d1(cin2), .o(carry));
endmodule
