// tb_eval_sizes_mul: the multiplier at the operand widths of the published
// delay comparison that its own testbench does not build, n = 12, 20, 24
// and 28 (4, 8, 16 and 32 are in tb_mod2n1_multiplier).
//
// One multiplier is built per width, each with its own compressor plan (n = 12:
// 13 rows, 7:2, 5:2, 4:2, 3:2; n = 28: 29 rows, five 7:2 and two 3:2). Every
// width gets the operand pairs made of 0, 1, 2^n - 1, 2^n and 2^(n-1),
// followed by random pairs in 0..2^n. The results are compared with x*y modulo
// 2^n+1 computed by shift-and-add in 64-bit integers. The units are
// combinational, so each result is checked 1 time unit after the operands
// change. The widths run in parallel; the result line is printed
// once all of them are done.
module tb_eval_sizes_mul;
  localparam int NSZ = 4;
  localparam int SZ [NSZ] = '{12, 20, 24, 28};
  localparam int NV = 3000;   // operand pairs per width

  int checks = 0, failures = 0, done = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // (a*b) mod m without overflow for m up to 2^32+1
  function automatic longint mulmod(longint a, longint b, longint m);
    longint acc, aa, bb;
    acc = 0; aa = a % m; bb = b;
    while (bb > 0) begin
      if (bb[0]) acc = (acc + aa) % m;
      aa = (aa * 2) % m;
      bb = bb >> 1;
    end
    return acc;
  endfunction

  task automatic check(int n, longint a, longint b, longint got);
    longint exp;
    exp = mulmod(a, b, (longint'(1) << n) + 1);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d x=%0d y=%0d got=%0d exp=%0d", n, a, b, got, exp);
    end
  endtask

  // operand k of width n: corner values first, then uniform in 0..2^n
  function automatic longint pick(int k, int n);
    longint top;
    longint unsigned rnd;
    top = longint'(1) << n;
    case (k)
      0: return 0;
      1: return 1;
      2: return top - 1;
      3: return top;
      4: return top >> 1;
      default: begin
        rnd = {$urandom, $urandom};
        rnd = rnd % (top + 1);
        return longint'(rnd);
      end
    endcase
  endfunction

  for (genvar g = 0; g < NSZ; g++) begin : g_sz
    localparam int N = SZ[g];
    logic [N:0] mx, my, mr;

    mod2n1_multiplier #(.N(N)) u_mul (.x(mx), .y(my), .r(mr));

    initial begin
      longint a, b;
      mx = '0; my = '0;
      for (int k = 0; k < NV; k++) begin
        a = pick((k < 25) ? k / 5 : k, N);
        b = pick((k < 25) ? k % 5 : k + 7, N);
        mx = (N+1)'(a); my = (N+1)'(b);
        #1;
        check(N, a, b, longint'(mr));
      end
      done++;
    end
  end

  initial begin
    wait (done == NSZ);
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
