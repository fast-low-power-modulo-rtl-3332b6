// tb_comp7_2: exhaustive check of the 7:2 compressor:
//   x1+..+x7 + cin1 + cin2 = sum + 2 (carry + cout1) + 4 cout2,
// and cout1, cout2 independent of both carry inputs.
// Combinational: each output is checked 1 time unit after the inputs change.
module tb_comp7_2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic x1, x2, x3, x4, x5, x6, x7, cin1, cin2, sum, carry, cout1, cout2;
  logic [1:0] co_ref;
  comp7_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .x5(x5), .x6(x6), .x7(x7),
               .cin1(cin1), .cin2(cin2),
               .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2));
  initial begin
    for (int v = 0; v < 512; v++) begin
      {x1, x2, x3, x4, x5, x6, x7, cin1, cin2} = 9'(v);
      #1;
      checks++;
      if (int'(sum) + 2 * (int'(carry) + int'(cout1)) + 4 * int'(cout2) != $countones(v)) begin
        failures++;
        if (failures < 10)
          $display("FAIL in=%b sum=%b carry=%b cout1=%b cout2=%b", v[8:0], sum, carry, cout1, cout2);
      end
      if (v[1:0] == 2'b00) co_ref = {cout2, cout1};
      else begin
        checks++;
        if ({cout2, cout1} != co_ref) failures++;
      end
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
