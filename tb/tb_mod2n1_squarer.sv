// tb_mod2n1_squarer: self-checking test of the modulo 2^n+1 squarer.
//
// n = 7 (the default) is checked for every legal input 0..2^7, including
// x = 2^n and results equal to 2^n. Widths 4, 5, 6, 8, 9 and 16 are checked
// exhaustively (up to n = 9) or on random inputs plus the corner values,
// against x*x mod (2^n+1) computed with integer arithmetic. The unit is
// combinational: every result is checked 1 time unit after the input changes,
// i.e. with zero cycles of latency. A watchdog ends the run if it hangs.
module tb_mod2n1_squarer;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  x7;  logic [7:0]  r7;
  logic [4:0]  x4;  logic [4:0]  r4;
  logic [5:0]  x5;  logic [5:0]  r5;
  logic [6:0]  x6;  logic [6:0]  r6;
  logic [8:0]  x8;  logic [8:0]  r8;
  logic [9:0]  x9;  logic [9:0]  r9;
  logic [16:0] x16; logic [16:0] r16;

  mod2n1_squarer                dut7  (.x(x7),  .r(r7));
  mod2n1_squarer #(.N(4))       dut4  (.x(x4),  .r(r4));
  mod2n1_squarer #(.N(5))       dut5  (.x(x5),  .r(r5));
  mod2n1_squarer #(.N(6))       dut6  (.x(x6),  .r(r6));
  mod2n1_squarer #(.N(8))       dut8  (.x(x8),  .r(r8));
  mod2n1_squarer #(.N(9))       dut9  (.x(x9),  .r(r9));
  mod2n1_squarer #(.N(16))      dut16 (.x(x16), .r(r16));

  function automatic longint sq_ref(longint v, int n);
    longint m;
    m = (longint'(1) << n) + 1;
    return (v * v) % m;
  endfunction

  task automatic check(string tag, longint v, longint got, int n);
    longint exp;
    exp = sq_ref(v, n);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s n=%0d x=%0d got=%0d exp=%0d", tag, n, v, got, exp);
    end
  endtask

  initial begin
    x7 = 0; x4 = 0; x5 = 0; x6 = 0; x8 = 0; x9 = 0; x16 = 0;
    // document example: 87^2 mod 129 = 87
    x7 = 8'd87; #1;
    check("example", 87, r7, 7);
    for (int v = 0; v <= 128; v++) begin
      x7 = 8'(v); #1; check("n7", v, r7, 7);
    end
    for (int v = 0; v <= 16; v++)  begin x4 = 5'(v);  #1; check("n4", v, r4, 4); end
    for (int v = 0; v <= 32; v++)  begin x5 = 6'(v);  #1; check("n5", v, r5, 5); end
    for (int v = 0; v <= 64; v++)  begin x6 = 7'(v);  #1; check("n6", v, r6, 6); end
    for (int v = 0; v <= 256; v++) begin x8 = 9'(v);  #1; check("n8", v, r8, 8); end
    for (int v = 0; v <= 512; v++) begin x9 = 10'(v); #1; check("n9", v, r9, 9); end
    for (int k = 0; k < 4000; k++) begin
      int v;
      v = (k < 3) ? ((k == 0) ? 0 : (k == 1) ? 65536 : 65535) : int'($urandom_range(0, 65536));
      x16 = 17'(v); #1; check("n16", v, r16, 16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
