// comp3_2: MUX-based 3:2 compressor (full adder).
//
// x1 + x2 + x3 = s + 2c. An XOR/XNOR cell forms x1^x2 on both rails; a MUX
// selected by x3 picks the rail that gives the sum, and a second MUX selected
// by x1^x2 passes x3 (propagate) or x1 (generate/kill) as the carry. The
// critical path is one XOR/XNOR and one MUX, as the document states for its
// 3:2 compressor; the exact cell arrangement is this design's choice since the
// document gives no drawing of it. Combinational.
module comp3_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  output logic s,
  output logic c
);
  logic x12, x12b;

  xor_xnor u_x12 (.a(x1), .b(x2), .o(x12), .ob(x12b));
  mux2     u_s   (.sel(x3),  .d0(x12), .d1(x12b), .o(s));
  mux2     u_c   (.sel(x12), .d0(x1),  .d1(x3),   .o(c));
endmodule
