// tb_comp5_2: exhaustive check of the 5:2 compressor:
//   x1+..+x5 + cin1 + cin2 = sum + 2 (carry + cout1 + cout2),
// and cout1 independent of both carry inputs.
// Combinational: each output is checked 1 time unit after the inputs change.
module tb_comp5_2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic x1, x2, x3, x4, x5, cin1, cin2, sum, carry, cout1, cout2;
  comp5_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .x5(x5), .cin1(cin1), .cin2(cin2),
               .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2));
  initial begin
    for (int v = 0; v < 128; v++) begin
      {x1, x2, x3, x4, x5, cin1, cin2} = 7'(v);
      #1;
      checks += 2;
      if (int'(sum) + 2 * (int'(carry) + int'(cout1) + int'(cout2)) != $countones(v)) begin
        failures++;
        $display("FAIL in=%b sum=%b carry=%b cout1=%b cout2=%b", v[6:0], sum, carry, cout1, cout2);
      end
      if (cout1 != ($countones(v[6:4]) >= 2)) failures++;
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
