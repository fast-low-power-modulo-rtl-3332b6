// tb_mod2n1_top: end-to-end test of the squarer and the multiplier at their
// default width (n = 7), with no parameter overrides.
//
// Every legal input of the squarer (0..2^7) and every legal operand pair of
// the multiplier is applied and compared with x^2 and x*y modulo 2^7+1
// computed in integer arithmetic; the squarer is also compared with the
// multiplier fed x twice. Both units are combinational, so each result is
// checked 1 time unit after its inputs change (zero cycles of latency).
//
// The run counts how often each mechanism of the design was exercised and
// fails if one never was:
//   in_2n     an operand equal to 2^n (the OR-merged x_n terms)
//   pair      a moved pair term of the squarer is 1
//   wrap      a carry leaving column n-1 of a reduction ring is 1 (it
//             re-enters column 0 inverted)
//   eac       the final adder's carry out is 1 (inverted end-around carry 0)
//   noeac     the final adder's carry out is 0 (end-around carry 1)
//   msb       a result equal to 2^n (complementary sum and carry vectors)
module tb_mod2n1_top;
  localparam int N = 7;
  localparam int M = (1 << N) + 1;
  localparam int H = mod2n1_pkg::sq_rows(N) - 1;
  localparam int MP = mod2n1_pkg::sq_pairs(N);

  int checks = 0, failures = 0;
  int n_in_2n = 0, n_pair = 0, n_wrap = 0, n_eac = 0, n_noeac = 0, n_msb = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N:0] sq_x, sq_r, mul_x, mul_y, mul_r;

  mod2n1_top dut (
    .sq_x (sq_x),
    .sq_r (sq_r),
    .mul_x(mul_x),
    .mul_y(mul_y),
    .mul_r(mul_r)
  );

  task automatic expect_eq(string tag, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", tag, got, exp);
    end
  endtask

  // observe internal mechanisms
  task automatic observe();
    logic [N:0] s1, s2;
    // carries out of the top column of both rings (any stage, any output)
    for (int t = 0; t < 3; t++)
      for (int k = 0; k < 3; k++) begin
        if (dut.u_sqr.u_ppr.cy[N-1][t][k]) n_wrap++;
        if (dut.u_mul.u_ppr.cy[N-1][t][k]) n_wrap++;
      end
    // terms that entered a column as one half of a moved pair
    for (int r = H - MP; r < H; r++)
      for (int c = 0; c < N; c++)
        if (dut.u_sqr.pp[r][c]) n_pair++;
    s1 = {1'b0, dut.u_sqr.sv} + {1'b0, dut.u_sqr.cv};
    s2 = {1'b0, dut.u_mul.sv} + {1'b0, dut.u_mul.cv};
    if (s1[N]) n_eac++; else n_noeac++;
    if (s2[N]) n_eac++; else n_noeac++;
    if (sq_r[N])  n_msb++;
    if (mul_r[N]) n_msb++;
  endtask

  initial begin
    sq_x = '0; mul_x = '0; mul_y = '0;
    for (int i = 0; i <= M - 1; i++) begin
      for (int j = 0; j <= M - 1; j++) begin
        mul_x = (N+1)'(i);
        mul_y = (N+1)'(j);
        sq_x  = (N+1)'(j);
        #1;
        expect_eq("mul", int'(mul_r), (i * j) % M);
        if (i == 0) begin
          expect_eq("sqr", int'(sq_r), (j * j) % M);
          if (j == M - 1) n_in_2n++;
        end
        if (i == j) expect_eq("sqr=mul", int'(sq_r), int'(mul_r));
        if (i == M - 1 || j == M - 1) n_in_2n++;
        observe();
      end
    end
    $display("mechanisms: in_2n=%0d pair=%0d wrap=%0d eac=%0d noeac=%0d msb=%0d",
             n_in_2n, n_pair, n_wrap, n_eac, n_noeac, n_msb);
    if (n_in_2n == 0) failures++;
    if (n_pair  == 0) failures++;
    if (n_wrap  == 0) failures++;
    if (n_eac   == 0) failures++;
    if (n_noeac == 0) failures++;
    if (n_msb   == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
