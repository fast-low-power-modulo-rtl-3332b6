// xor_xnor: two-input XOR that also delivers its complement.
//
// o = a ^ b and ob = ~(a ^ b). The compressors feed both rails to the data
// inputs of a following MUX, so no separate inverter stage is needed (the
// document's reason for using both outputs). Combinational.
module xor_xnor (
  input  logic a,
  input  logic b,
  output logic o,
  output logic ob
);
  assign o  = a ^ b;
  assign ob = ~(a ^ b);
endmodule
