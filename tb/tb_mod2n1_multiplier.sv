// tb_mod2n1_multiplier: self-checking test of the modulo 2^n+1 multiplier.
//
// n = 7 (default) is checked for every operand pair in 0..2^7, n = 4 and 5
// likewise; n = 8 (7:2 + 3:2 + 3:2 columns), n = 16 (two 7:2, a 5:2, two 3:2)
// and n = 32 on random pairs plus the operands 0, 2^n and 2^n - 1. The
// reference is x*y mod (2^n+1) in integer arithmetic. Combinational unit:
// each result is checked 1 time unit after the operands change.
module tb_mod2n1_multiplier;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  x7,  y7,  r7;
  logic [4:0]  x4,  y4,  r4;
  logic [5:0]  x5,  y5,  r5;
  logic [8:0]  x8,  y8,  r8;
  logic [16:0] x16, y16, r16;
  logic [32:0] x32, y32, r32;

  mod2n1_multiplier            dut7  (.x(x7),  .y(y7),  .r(r7));
  mod2n1_multiplier #(.N(4))   dut4  (.x(x4),  .y(y4),  .r(r4));
  mod2n1_multiplier #(.N(5))   dut5  (.x(x5),  .y(y5),  .r(r5));
  mod2n1_multiplier #(.N(8))   dut8  (.x(x8),  .y(y8),  .r(r8));
  mod2n1_multiplier #(.N(16))  dut16 (.x(x16), .y(y16), .r(r16));
  mod2n1_multiplier #(.N(32))  dut32 (.x(x32), .y(y32), .r(r32));

  // (a*b) mod m without overflow for m up to 2^32+1
  function automatic longint mulmod(longint a, longint b, longint m);
    longint acc, aa, bb;
    acc = 0; aa = a % m; bb = b;
    while (bb > 0) begin
      if (bb[0]) acc = (acc + aa) % m;
      aa = (aa * 2) % m;
      bb = bb >> 1;
    end
    return acc;
  endfunction

  task automatic check(int n, longint a, longint b, longint got);
    longint exp;
    exp = mulmod(a, b, (longint'(1) << n) + 1);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d x=%0d y=%0d got=%0d exp=%0d", n, a, b, got, exp);
    end
  endtask

  function automatic longint pick(int k, int n);
    longint top;
    longint unsigned rnd;
    top = longint'(1) << n;
    case (k % 16)
      0: return 0;
      1: return top;
      2: return top - 1;
      default: begin
        rnd = {$urandom, $urandom};
        rnd = rnd % (top + 1);
        return longint'(rnd);
      end
    endcase
  endfunction

  initial begin
    longint a, b;
    x7 = 0; y7 = 0; x4 = 0; y4 = 0; x5 = 0; y5 = 0;
    x8 = 0; y8 = 0; x16 = 0; y16 = 0; x32 = 0; y32 = 0;
    for (int i = 0; i <= 128; i++)
      for (int j = 0; j <= 128; j++) begin
        x7 = 8'(i); y7 = 8'(j); #1; check(7, i, j, longint'(r7));
      end
    for (int i = 0; i <= 16; i++)
      for (int j = 0; j <= 16; j++) begin
        x4 = 5'(i); y4 = 5'(j); #1; check(4, i, j, longint'(r4));
      end
    for (int i = 0; i <= 32; i++)
      for (int j = 0; j <= 32; j++) begin
        x5 = 6'(i); y5 = 6'(j); #1; check(5, i, j, longint'(r5));
      end
    for (int k = 0; k < 6000; k++) begin
      a = pick(k, 8);  b = pick(k / 16 + 3 * k, 8);
      x8 = 9'(a); y8 = 9'(b); #1; check(8, a, b, longint'(r8));
      a = pick(k, 16); b = pick(k / 16 + 3 * k, 16);
      x16 = 17'(a); y16 = 17'(b); #1; check(16, a, b, longint'(r16));
      a = pick(k, 32); b = pick(k / 16 + 3 * k, 32);
      x32 = 33'(a); y32 = 33'(b); #1; check(32, a, b, longint'(r32));
    end
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
