// tb_comp4_2: exhaustive check of the 4:2 compressor:
//   x1+x2+x3+x4+cin = s + 2 (c + cout), and cout independent of cin.
// Combinational: each output is checked 1 time unit after the inputs change.
module tb_comp4_2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic x1, x2, x3, x4, cin, s, c, cout, cout_c0;
  comp4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin), .s(s), .c(c), .cout(cout));
  initial begin
    for (int v = 0; v < 32; v++) begin
      {x1, x2, x3, x4, cin} = 5'(v);
      #1;
      checks++;
      if (int'(s) + 2 * (int'(c) + int'(cout)) != $countones(v)) begin
        failures++;
        $display("FAIL in=%b s=%b c=%b cout=%b", v[4:0], s, c, cout);
      end
      if (!cin) cout_c0 = cout;
      else begin
        checks++;
        if (cout != cout_c0) failures++;
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
