// csg: conditional sum generator of the sparse-tree adder.
//
// Produces the K sum bits of one block of the final adder for both possible
// carries into the block and selects with the carry cin delivered by the
// sparse carry tree. Inputs are the per-bit generate g = a&b, propagate
// p = a|b and half sum h = a^b of the block. Two ripple rails of carry-merge
// cells compute the internal carries assuming a block carry-in of 0 and of 1;
// each bit is XORed with both rail carries and a 2:1 MUX driven by cin picks
// the result. This follows the document's drawing of the 4-bit generator;
// K is a parameter so that a shorter last block can reuse it. Combinational;
// the path from cin is a single MUX.
module csg #(
  parameter int unsigned K = 4
) (
  input  logic [K-1:0] g,
  input  logic [K-1:0] p,
  input  logic [K-1:0] h,
  input  logic         cin,
  output logic [K-1:0] s
);
  logic [K-1:0] c0, c1;   // carry into bit k, block carry-in 0 / 1
  logic [K-1:0] s0, s1;

  assign c0[0] = 1'b0;
  assign c1[0] = 1'b1;
  for (genvar k = 0; k + 1 < K; k++) begin : g_rail
    assign c0[k+1] = g[k] | (p[k] & c0[k]);
    assign c1[k+1] = g[k] | (p[k] & c1[k]);
  end

  assign s0 = h ^ c0;
  assign s1 = h ^ c1;
  assign s  = cin ? s1 : s0;
endmodule
