// tb_sqr_ppg: check of the squarer's partial-product generation.
//
// For every legal input x (0..2^n) at n = 7 (default), 6 and 8, the rows must
// satisfy  sum(rows) + (R-2) + 1 == x^2  (mod 2^n+1), i.e. the rows plus the
// corrections applied by the reduction ((R-2)*2^n = -(R-2)) and the final adder
// (+1) give the square. The row count R = n - m + 1 and the constant last row
// (= 2) are checked too. Combinational: 1 time unit after each input change.
module tb_sqr_ppg;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int R7 = mod2n1_pkg::sq_rows(7);
  localparam int R6 = mod2n1_pkg::sq_rows(6);
  localparam int R8 = mod2n1_pkg::sq_rows(8);

  logic [7:0] x7; logic [6:0] pp7 [R7];
  logic [6:0] x6; logic [5:0] pp6 [R6];
  logic [8:0] x8; logic [7:0] pp8 [R8];

  sqr_ppg          dut7 (.x(x7), .pp(pp7));
  sqr_ppg #(.N(6)) dut6 (.x(x6), .pp(pp6));
  sqr_ppg #(.N(8)) dut8 (.x(x8), .pp(pp8));

  task automatic chk(int n, int x, int rows, int s, int last);
    int m;
    m = (1 << n) + 1;
    checks += 2;
    if ((s + rows - 1) % m != (x * x) % m) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d x=%0d", n, x);
    end
    if (last != 2) failures++;
  endtask

  initial begin
    int s;
    checks++;
    if (R7 != 6 || R6 != 6 || R8 != 7) failures++;   // (n+5)/2 odd, (n+6)/2 even
    for (int v = 0; v <= 128; v++) begin
      x7 = 8'(v); #1;
      s = 0;
      for (int r = 0; r < R7; r++) s += int'(pp7[r]);
      chk(7, v, R7, s, int'(pp7[R7-1]));
    end
    for (int v = 0; v <= 64; v++) begin
      x6 = 7'(v); #1;
      s = 0;
      for (int r = 0; r < R6; r++) s += int'(pp6[r]);
      chk(6, v, R6, s, int'(pp6[R6-1]));
    end
    for (int v = 0; v <= 256; v++) begin
      x8 = 9'(v); #1;
      s = 0;
      for (int r = 0; r < R8; r++) s += int'(pp8[r]);
      chk(8, v, R8, s, int'(pp8[R8-1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
