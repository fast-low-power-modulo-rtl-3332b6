// mod2n1_top: the modulo 2^n+1 squarer and multiplier side by side.
//
// The two units share no logic; each has its own operands and result, all
// (n+1)-bit weighted numbers in 0..2^n:
//   sq_r  = sq_x^2        mod (2^n+1)
//   mul_r = mul_x * mul_y mod (2^n+1)
// Both are combinational. N defaults to 7, the width of the document's worked
// squarer implementation.
module mod2n1_top #(
  parameter int unsigned N = 7
) (
  input  logic [N:0] sq_x,
  output logic [N:0] sq_r,
  input  logic [N:0] mul_x,
  input  logic [N:0] mul_y,
  output logic [N:0] mul_r
);
  mod2n1_squarer #(.N(N)) u_sqr (
    .x(sq_x),
    .r(sq_r)
  );

  mod2n1_multiplier #(.N(N)) u_mul (
    .x(mul_x),
    .y(mul_y),
    .r(mul_r)
  );
endmodule
