// tb_mul_ppg: check of the multiplier's partial-product generation.
//
// For every legal operand pair at n = 7 (default) and n = 4, the n+1 rows must
// satisfy  sum(rows) + (n-1) + 1 == x*y  (mod 2^n+1): the reduction adds
// (n-1)*2^n = -(n-1) and the final adder +1. The last row must be the
// constant 2. Combinational: 1 time unit after each input change.
module tb_mul_ppg;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] x7, y7; logic [6:0] pp7 [8];
  logic [4:0] x4, y4; logic [3:0] pp4 [5];

  mul_ppg          dut7 (.x(x7), .y(y7), .pp(pp7));
  mul_ppg #(.N(4)) dut4 (.x(x4), .y(y4), .pp(pp4));

  initial begin
    int s;
    for (int i = 0; i <= 128; i++)
      for (int j = 0; j <= 128; j++) begin
        x7 = 8'(i); y7 = 8'(j); #1;
        s = 0;
        for (int r = 0; r < 8; r++) s += int'(pp7[r]);
        checks += 2;
        if ((s + 7) % 129 != (i * j) % 129) begin
          failures++;
          if (failures < 10) $display("FAIL n=7 x=%0d y=%0d", i, j);
        end
        if (pp7[7] != 7'd2) failures++;
      end
    for (int i = 0; i <= 16; i++)
      for (int j = 0; j <= 16; j++) begin
        x4 = 5'(i); y4 = 5'(j); #1;
        s = 0;
        for (int r = 0; r < 5; r++) s += int'(pp4[r]);
        checks++;
        if ((s + 4) % 17 != (i * j) % 17) failures++;
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
