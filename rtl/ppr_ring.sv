// ppr_ring: partial-product reduction of the modulo 2^n+1 multiplier and
// squarer.
//
// Adds R partial-product rows of n bits modulo 2^n+1 down to two n-bit
// vectors, sum_o and carry_o:
//   sum_o + carry_o == sum(pp) + (R-2)   (mod 2^n+1)
// The (R-2) is (R-2)*2^n with 2^n = -1: every carry that leaves column n-1
// (weight 2^n) re-enters column 0 complemented, because c*2^n = ~c + 2^n
// (mod 2^n+1), and each such wrap adds 2^n to the constant the caller has to
// correct for. A reduction of R rows to 2 always wraps R-2 carries (a carry of
// weight 4 counts twice: from column n-2 it re-enters column 0, from column
// n-1 column 1), so the correction is the document's (R-2)*2^n.
//
// Every column is the same chain of compressors, chosen at elaboration time by
// mod2n1_pkg::sched: the widest of 7:2, 5:2, 4:2 and 3:2 that the available
// bits fill, in the document's order of preference. Carries go to the same or
// a later stage of the next column up, so the ring has no combinational loop.
// For n = 7 (squarer, R = 6) this is the document's drawing: a 4:2 on five
// partial-product bits, then two 3:2 stages fed by the carries of the column
// below, with four inverted end-around carries. For R = 9 it gives 7:2, 3:2,
// 3:2 and for R = 17 two 7:2, one 5:2 and two 3:2, again as in the document.
// USE7 = 0 restricts the plan to 5:2, 4:2 and 3:2.
//
// The order in which bits enter a compressor's pins (previous sum first, then
// partial products, then carries, oldest first) is this design's choice.
// Combinational.
module ppr_ring #(
  parameter int unsigned N    = 7,
  parameter int unsigned R    = 6,
  parameter bit          USE7 = 1'b1
) (
  input  logic [N-1:0] pp [R],
  output logic [N-1:0] sum_o,
  output logic [N-1:0] carry_o
);
  import mod2n1_pkg::*;

  localparam int NST = sched(R, USE7, -1, 0);
  localparam int NS  = (NST > 0) ? NST : 1;

  logic s_st [N][NS];      // sum output of stage t of column c
  logic cy   [N][NS][3];   // carry k of stage t of column c
  logic pin  [N][NS][9];   // compressor input pins

  // value of source CODE as seen by column C
  function automatic logic src(input int c, input int code);
    int t, k;
    if (code < SRC_SUM) return pp[code][c];
    if (code < SRC_C1)  return s_st[c][code - SRC_SUM];
    if (code < SRC_C2) begin
      t = (code - SRC_C1) / 4;
      k = (code - SRC_C1) % 4;
      return (c == 0) ? ~cy[N-1][t][k] : cy[c-1][t][k];
    end
    t = (code - SRC_C2) / 4;
    k = (code - SRC_C2) % 4;
    return (c >= 2) ? cy[c-2][t][k] : ~cy[c+N-2][t][k];
  endfunction

  for (genvar c = 0; c < N; c++) begin : g_col
    for (genvar t = 0; t < NST; t++) begin : g_st
      localparam comp_e TYP = comp_e'(sched(R, USE7, t, -1));
      localparam int    W   = comp_width(TYP);
      for (genvar p = 0; p < 9; p++) begin : g_pin
        if (p < W) begin : g_used
          localparam int CODE = sched(R, USE7, t, p);
          assign pin[c][t][p] = src(c, CODE);
        end else begin : g_unused
          assign pin[c][t][p] = 1'b0;
        end
      end

      if (TYP == CMP_3_2) begin : g_c32
        comp3_2 u_cmp (
          .x1(pin[c][t][0]), .x2(pin[c][t][1]), .x3(pin[c][t][2]),
          .s(s_st[c][t]), .c(cy[c][t][0])
        );
        assign cy[c][t][1] = 1'b0;
        assign cy[c][t][2] = 1'b0;
      end else if (TYP == CMP_4_2) begin : g_c42
        comp4_2 u_cmp (
          .x1(pin[c][t][0]), .x2(pin[c][t][1]), .x3(pin[c][t][2]),
          .x4(pin[c][t][3]), .cin(pin[c][t][4]),
          .s(s_st[c][t]), .c(cy[c][t][0]), .cout(cy[c][t][1])
        );
        assign cy[c][t][2] = 1'b0;
      end else if (TYP == CMP_5_2) begin : g_c52
        comp5_2 u_cmp (
          .x1(pin[c][t][0]), .x2(pin[c][t][1]), .x3(pin[c][t][2]),
          .x4(pin[c][t][3]), .x5(pin[c][t][4]),
          .cin1(pin[c][t][5]), .cin2(pin[c][t][6]),
          .sum(s_st[c][t]), .carry(cy[c][t][0]),
          .cout1(cy[c][t][1]), .cout2(cy[c][t][2])
        );
      end else begin : g_c72
        comp7_2 u_cmp (
          .x1(pin[c][t][0]), .x2(pin[c][t][1]), .x3(pin[c][t][2]),
          .x4(pin[c][t][3]), .x5(pin[c][t][4]), .x6(pin[c][t][5]),
          .x7(pin[c][t][6]), .cin1(pin[c][t][7]), .cin2(pin[c][t][8]),
          .sum(s_st[c][t]), .carry(cy[c][t][0]),
          .cout1(cy[c][t][1]), .cout2(cy[c][t][2])
        );
      end
    end

    // the two bits left in the column form the output vectors
    localparam int F0 = sched(R, USE7, NST, 0);
    localparam int F1 = sched(R, USE7, NST, 1);
    assign sum_o[c]   = src(c, F0);
    assign carry_o[c] = src(c, F1);
  end

  if (NST == 0) begin : g_nostage
    for (genvar c = 0; c < N; c++) begin : g_tie
      assign s_st[c][0] = 1'b0;
      for (genvar k = 0; k < 3; k++) begin : g_k
        assign cy[c][0][k] = 1'b0;
      end
      for (genvar p = 0; p < 9; p++) begin : g_p
        assign pin[c][0][p] = 1'b0;
      end
    end
  end
endmodule
