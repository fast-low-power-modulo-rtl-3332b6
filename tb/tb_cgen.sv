// tb_cgen: exhaustive check of the carry generator against the count of ones
// of its inputs (carry = 1 when two or more inputs are 1).
// Combinational: each output is checked 1 time unit after the inputs change.
module tb_cgen;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic x, y, z, c;
  cgen dut (.x(x), .y(y), .z(z), .c(c));
  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      #1;
      checks++;
      if (c != ($countones(v) >= 2)) failures++;
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
