// tb_ppr_ring: check of the compressor-column reduction ring.
//
// Random partial-product rows are reduced by rings of several shapes and the
// result must satisfy  sum_o + carry_o == sum(rows) + (R-2)  (mod 2^n+1),
// the (R-2) being the inverted end-around carries' correction:
//   n=7,  R=6   default, the squarer's ring: 4:2, 3:2, 3:2 per column
//   n=7,  R=8   5:2, 4:2, 3:2
//   n=8,  R=9   7:2, 3:2, 3:2 (weight-4 carries wrap into columns 0 and 1)
//   n=16, R=17  7:2, 7:2, 5:2, 3:2, 3:2
//   n=8,  R=9 with USE7=0: 5:2, 4:2, 3:2, 3:2
// The compressor plans are also compared with these lists. All-zero and
// all-one rows are included. Combinational: 1 time unit after each change.
module tb_ppr_ring;
  import mod2n1_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [6:0]  pa [6];  logic [6:0]  sa, ca;
  logic [6:0]  pb [8];  logic [6:0]  sb, cb;
  logic [7:0]  pc [9];  logic [7:0]  sc, cc;
  logic [15:0] pd [17]; logic [15:0] sd, cd;
  logic [7:0]  pe [9];  logic [7:0]  se, ce;

  ppr_ring                              ua (.pp(pa), .sum_o(sa), .carry_o(ca));
  ppr_ring #(.N(7),  .R(8))             ub (.pp(pb), .sum_o(sb), .carry_o(cb));
  ppr_ring #(.N(8),  .R(9))             uc (.pp(pc), .sum_o(sc), .carry_o(cc));
  ppr_ring #(.N(16), .R(17))            ud (.pp(pd), .sum_o(sd), .carry_o(cd));
  ppr_ring #(.N(8),  .R(9), .USE7(0))   ue (.pp(pe), .sum_o(se), .carry_o(ce));

  task automatic chk(string tag, int n, longint rows_sum, int r, longint s, longint c);
    longint m;
    m = (longint'(1) << n) + 1;
    checks++;
    if ((s + c) % m != (rows_sum + r - 2) % m) begin
      failures++;
      if (failures < 10) $display("FAIL %s s=%0d c=%0d rows=%0d", tag, s, c, rows_sum);
    end
  endtask

  task automatic plan(string tag, int r, bit u7, comp_e e0, comp_e e1, comp_e e2, comp_e e3, comp_e e4);
    comp_e want [5];
    want = '{e0, e1, e2, e3, e4};
    for (int t = 0; t < 5; t++) begin
      checks++;
      if (comp_e'(sched(r, u7, t, -1)) != want[t]) begin
        failures++;
        $display("FAIL plan %s stage %0d", tag, t);
      end
    end
  endtask

  initial begin
    longint sum;
    plan("R6",  6,  1, CMP_4_2, CMP_3_2, CMP_3_2, CMP_NONE, CMP_NONE);
    plan("R8",  8,  1, CMP_5_2, CMP_4_2, CMP_3_2, CMP_NONE, CMP_NONE);
    plan("R9",  9,  1, CMP_7_2, CMP_3_2, CMP_3_2, CMP_NONE, CMP_NONE);
    plan("R17", 17, 1, CMP_7_2, CMP_7_2, CMP_5_2, CMP_3_2, CMP_3_2);
    plan("R9n", 9,  0, CMP_5_2, CMP_4_2, CMP_3_2, CMP_3_2, CMP_NONE);
    for (int k = 0; k < 5000; k++) begin
      for (int r = 0; r < 6;  r++) pa[r] = (k == 0) ? '0 : (k == 1) ? '1 : 7'($urandom);
      for (int r = 0; r < 8;  r++) pb[r] = (k == 0) ? '0 : (k == 1) ? '1 : 7'($urandom);
      for (int r = 0; r < 9;  r++) pc[r] = (k == 0) ? '0 : (k == 1) ? '1 : 8'($urandom);
      for (int r = 0; r < 17; r++) pd[r] = (k == 0) ? '0 : (k == 1) ? '1 : 16'($urandom);
      for (int r = 0; r < 9;  r++) pe[r] = pc[r];
      #1;
      sum = 0; for (int r = 0; r < 6;  r++) sum += longint'(pa[r]);
      chk("a", 7, sum, 6, longint'(sa), longint'(ca));
      sum = 0; for (int r = 0; r < 8;  r++) sum += longint'(pb[r]);
      chk("b", 7, sum, 8, longint'(sb), longint'(cb));
      sum = 0; for (int r = 0; r < 9;  r++) sum += longint'(pc[r]);
      chk("c", 8, sum, 9, longint'(sc), longint'(cc));
      chk("e", 8, sum, 9, longint'(se), longint'(ce));
      sum = 0; for (int r = 0; r < 17; r++) sum += longint'(pd[r]);
      chk("d", 16, sum, 17, longint'(sd), longint'(cd));
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
