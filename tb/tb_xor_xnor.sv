// tb_xor_xnor: exhaustive check of the dual-rail XOR cell: o = a^b, ob = ~o.
// Combinational: each output is checked 1 time unit after the inputs change.
module tb_xor_xnor;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic a, b, o, ob;
  xor_xnor dut (.a(a), .b(b), .o(o), .ob(ob));
  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks += 2;
      if (o  != (v[0] != v[1])) failures++;
      if (ob != (v[0] == v[1])) failures++;
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
