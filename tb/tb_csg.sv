// tb_csg: exhaustive check of the 4-bit conditional sum generator.
// For all block operands a, b and both block carries cin, the output must be
// the low K bits of a + b + cin (g = a&b, p = a|b, h = a^b are formed here).
// A 3-bit instance (the shorter last block of a 7-bit adder) is also checked.
// Combinational: each output is checked 1 time unit after the inputs change.
module tb_csg;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [3:0] a4, b4, s4;
  logic [2:0] a3, b3, s3;
  logic       cin;
  csg         dut4 (.g(a4 & b4), .p(a4 | b4), .h(a4 ^ b4), .cin(cin), .s(s4));
  csg #(.K(3)) dut3 (.g(a3 & b3), .p(a3 | b3), .h(a3 ^ b3), .cin(cin), .s(s3));
  initial begin
    for (int v = 0; v < 512; v++) begin
      {cin, a4, b4} = 9'(v);
      a3 = a4[2:0];
      b3 = b4[2:0];
      #1;
      checks += 2;
      if (s4 != 4'(int'(a4) + int'(b4) + int'(cin))) failures++;
      if (s3 != 3'(int'(a3) + int'(b3) + int'(cin))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
