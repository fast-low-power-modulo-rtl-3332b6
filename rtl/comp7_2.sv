// comp7_2: MUX-based 7:2 compressor.
//
// x1+..+x7 + cin1 + cin2 = sum + 2 (carry + cout1) + 4 cout2.
// Two CGEN + XOR/XNOR + MUX full adders compress x2..x4 and x5..x7; a third
// (CGEN, XOR/XNOR, MUX) adds their sums and x1. The three weight-2 carries
// leave as cout1 (their parity, weight 2) and cout2 (their majority, weight 4).
// The last two MUXes add cin2 and cin1 to the remaining sum bit and give sum
// and carry. Critical path: one XOR/XNOR and five MUXes, as the document
// states. The document's column drawing sends one 7:2 carry two columns up
// (weight 4), which is how cout2 is weighted here; the wiring inside follows
// this design's reading of the cell drawing, checked against that equation.
// Combinational.
module comp7_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic x5,
  input  logic x6,
  input  logic x7,
  input  logic cin1,
  input  logic cin2,
  output logic sum,
  output logic carry,
  output logic cout1,
  output logic cout2
);
  logic cl, x67, x67b, sl;
  logic cr, x34, x34b, sr;
  logic c2, xs, xsb, s2, s2b;
  logic xc, xcb;
  logic s3, s3b;

  // x5 + x6 + x7 = sl + 2 cl
  cgen     u_cl  (.x(x5), .y(x6), .z(x7), .c(cl));
  xor_xnor u_x67 (.a(x6), .b(x7), .o(x67), .ob(x67b));
  mux2     u_sl  (.sel(x5), .d0(x67), .d1(x67b), .o(sl));
  // x2 + x3 + x4 = sr + 2 cr
  cgen     u_cr  (.x(x2), .y(x3), .z(x4), .c(cr));
  xor_xnor u_x34 (.a(x3), .b(x4), .o(x34), .ob(x34b));
  mux2     u_sr  (.sel(x2), .d0(x34), .d1(x34b), .o(sr));
  // sl + sr + x1 = s2 + 2 c2
  cgen     u_c2  (.x(sl), .y(sr), .z(x1), .c(c2));
  xor_xnor u_xs  (.a(sl), .b(sr), .o(xs), .ob(xsb));
  mux2     u_s2  (.sel(x1), .d0(xs),  .d1(xsb), .o(s2));
  mux2     u_s2b (.sel(x1), .d0(xsb), .d1(xs),  .o(s2b));
  // cl + cr + c2 = cout1 + 2 cout2   (all at weight 2)
  xor_xnor u_xc  (.a(cl), .b(cr), .o(xc), .ob(xcb));
  mux2     u_co1 (.sel(c2), .d0(xc), .d1(xcb), .o(cout1));
  mux2     u_co2 (.sel(xc), .d0(cl), .d1(c2),  .o(cout2));
  // s2 + cin2 + cin1 = sum + 2 carry
  mux2     u_s3  (.sel(cin2), .d0(s2),  .d1(s2b), .o(s3));
  mux2     u_s3b (.sel(cin2), .d0(s2b), .d1(s2),  .o(s3b));
  mux2     u_sum (.sel(cin1), .d0(s3),  .d1(s3b), .o(sum));
  mux2     u_cy  (.sel(s3),   .d0(s2),  .d1(cin1), .o(carry));
endmodule
