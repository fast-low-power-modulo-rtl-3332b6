// tb_comp3_2: exhaustive check of the 3:2 compressor: x1+x2+x3 = s + 2c.
// Combinational: each output is checked 1 time unit after the inputs change.
module tb_comp3_2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic x1, x2, x3, s, c;
  comp3_2 dut (.x1(x1), .x2(x2), .x3(x3), .s(s), .c(c));
  initial begin
    for (int v = 0; v < 8; v++) begin
      {x1, x2, x3} = 3'(v);
      #1;
      checks++;
      if (int'(s) + 2 * int'(c) != $countones(v)) begin
        failures++;
        $display("FAIL in=%b s=%b c=%b", v[2:0], s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
