// tb_sparse_ieac_adder: self-checking test of the sparse-tree inverted
// end-around-carry adder.
//
// Checks r == (a + b + 1) mod (2^n+1) for every operand pair at n = 7 and
// n = 8, and for random pairs plus the corner cases (complementary operands,
// both all ones, both zero) at the default n = 16 and at n = 32. The adder is
// combinational, so each result is checked 1 time unit after its inputs
// change. A watchdog ends the run if it hangs.
module tb_sparse_ieac_adder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] a16, b16; logic [16:0] r16;
  logic [6:0]  a7,  b7;  logic [7:0]  r7;
  logic [7:0]  a8,  b8;  logic [8:0]  r8;
  logic [31:0] a32, b32; logic [32:0] r32;

  sparse_ieac_adder                dut16 (.a(a16), .b(b16), .r(r16));
  sparse_ieac_adder #(.WIDTH(7))   dut7  (.a(a7),  .b(b7),  .r(r7));
  sparse_ieac_adder #(.WIDTH(8))   dut8  (.a(a8),  .b(b8),  .r(r8));
  sparse_ieac_adder #(.WIDTH(32))  dut32 (.a(a32), .b(b32), .r(r32));

  task automatic check(int n, longint a, longint b, longint got);
    longint exp;
    exp = (a + b + 1) % ((longint'(1) << n) + 1);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d a=%0d b=%0d got=%0d exp=%0d", n, a, b, got, exp);
    end
  endtask

  initial begin
    a16 = 0; b16 = 0; a7 = 0; b7 = 0; a8 = 0; b8 = 0; a32 = 0; b32 = 0;
    for (int i = 0; i < 128; i++)
      for (int j = 0; j < 128; j++) begin
        a7 = 7'(i); b7 = 7'(j); #1; check(7, i, j, longint'(r7));
      end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1; check(8, i, j, longint'(r8));
      end
    for (int k = 0; k < 20000; k++) begin
      case (k)
        0: begin a16 = 16'h0000; b16 = 16'hFFFF; end
        1: begin a16 = 16'hFFFF; b16 = 16'hFFFF; end
        2: begin a16 = 16'h0000; b16 = 16'h0000; end
        3: begin a16 = 16'h5A5A; b16 = 16'hA5A5; end
        default: begin a16 = 16'($urandom); b16 = 16'($urandom); end
      endcase
      a32 = $urandom; b32 = (k % 7 == 0) ? ~a32 : $urandom;
      #1;
      check(16, longint'(a16), longint'(b16), longint'(r16));
      check(32, longint'(a32), longint'(b32), longint'(r32));
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
