// mux2: 2:1 multiplexer, the basic cell of the compressors.
//
// o = sel ? d1 : d0. The compressors use it in place of XOR gates: with the
// data inputs tied to a signal and its complement, the MUX forms an XOR whose
// select is the later-arriving input. Purely combinational, no timing of its
// own beyond one gate delay. The cell and its use follow the document; the
// port names are this design's.
module mux2 (
  input  logic sel,
  input  logic d0,
  input  logic d1,
  output logic o
);
  assign o = sel ? d1 : d0;
endmodule
