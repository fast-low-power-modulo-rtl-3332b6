// cgen: carry generator of the compressors, Cout = (x + y) z + x y.
//
// This is the majority of its three inputs, the carry of a full adder. The
// compressors use it off the critical path for their outgoing carries. The
// equation is the document's. Combinational.
module cgen (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic c
);
  assign c = ((x | y) & z) | (x & y);
endmodule
