// tb_mux2: exhaustive check of the 2:1 multiplexer, o = sel ? d1 : d0.
// Combinational: each output is checked 1 time unit after the inputs change.
module tb_mux2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic sel, d0, d1, o;
  mux2 dut (.sel(sel), .d0(d0), .d1(d1), .o(o));
  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, d1, d0} = 3'(v);
      #1;
      checks++;
      if (o != (v[2] ? v[1] : v[0])) begin
        failures++;
        $display("FAIL sel=%0b d1=%0b d0=%0b o=%0b", sel, d1, d0, o);
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
