// dec_pprt -- decimal partial-product reduction tree.
//
// Takes the d+1 partial products in XS-3 (with their ten's-complement hot
// ones) and returns the product as two 2d-digit words, A in excess-6 and B
// in BCD, whose decimal sum is X*Y modulo 10^(2d). It works in three parts:
//   1. dec_csa_tree: binary carry-save reduction of every digit column to a
//      pair (S, H), with the digits read as ODDS (plain 4-bit binary,
//      value 0..15);
//   2. carry_count_x6 per column: counts the decimal carries that left the
//      column and the one to its right and forms 6*own + prev;
//   3. dec_digit_32 per column: adds S, H and the corrections that land on
//      the column and splits the result into a BCD digit and a transfer.
// Before the tree the XS-3 digits are turned into ODDS ones by adding a
// constant row to the array (a digit of XS-3 code v stands for v-3, so the
// row holds -3 for every partial-product digit); the same constant also
// closes the sign extension of the negative partial products.
//
// Array (this design's layout): row k is PP[k] at columns k..k+d. Sign
// extension: -s*10^m is written as (1-s)*10^m - 10^m, with m = k+d+1; the
// -10^m goes into the constant and the bit (1-s_k) stays at column k+d+1.
// The hot ones s_k belong at column k. Every column holds exactly one of
// these single bits, so it is merged with the column's constant digit C
// (from bcd_mult_pkg::odds_const_digit) into one word: C + s_c in columns
// 0..d, C + 1 - s_k in columns d+1..2d-1; C <= 9, so the word is at most
// 10 and is only a choice between two constants. Columns at and above 2d
// are dropped. The tallest column (column d) has d+2 words: d+1
// partial-product digits and the constant word.
//
// Interface: pp[k][i] is digit i of partial product k (XS-3 code), hot[k]
// its ten's-complement increment. a is excess-6 (digit + 6), b BCD; for
// every column a-6+b <= 18, so the final adder propagates at most one
// carry per digit. Purely combinational.
module dec_pprt
  import bcd_mult_pkg::*;
#(
  parameter int unsigned NDIG = 16,
  localparam int unsigned NCOL = 2 * NDIG,
  localparam int unsigned W0   = max_init(NDIG),
  localparam int unsigned MAXE = max_exits(NDIG),
  localparam int unsigned LD   = dec_digits_x6(MAXE)
) (
  input  logic [NDIG:0][NDIG:0][3:0] pp,
  input  logic [NDIG:0]              hot,
  output logic [NCOL-1:0][3:0]       a,
  output logic [NCOL-1:0][3:0]       b
);

  if (LD > 7) begin : g_check
    $error("dec_pprt: correction of %0d digits exceeds the single-digit transfer bound", LD);
  end

  logic [NCOL-1:0][W0-1:0][3:0] col;
  logic [NCOL-1:0][3:0]         s, h;
  logic [NCOL-1:0][MAXE-1:0]    exits;
  logic [NCOL-1:0][LD-1:0][3:0] corr;
  logic [NCOL-1:0][3:0]         r, q;

  // Build the partial-product array column by column.
  for (genvar c = 0; c < NCOL; c++) begin : g_col
    localparam int NPP = pp_rows(c, NDIG);
    localparam int K0  = pp_first_row(c, NDIG);
    localparam logic [3:0] C = 4'(odds_const_digit(c, NDIG));
    for (genvar j = 0; j < W0; j++) begin : g_slot
      if (j < NPP) begin : g_pp
        assign col[c][j] = pp[K0 + j][c - K0 - j];
      end else if (j == NPP && has_hot(c, NDIG)) begin : g_const_hot
        assign col[c][j] = hot[c] ? C + 4'd1 : C;
      end else if (j == NPP && has_ext(c, NDIG)) begin : g_const_ext
        assign col[c][j] = hot[c - NDIG - 1] ? C : C + 4'd1;
      end else begin : g_free
        assign col[c][j] = 4'd0;
      end
    end
  end

  dec_csa_tree #(.NDIG(NDIG)) u_tree (
    .col_in(col),
    .s     (s),
    .h     (h),
    .exits (exits)
  );

  for (genvar c = 0; c < NCOL; c++) begin : g_fix
    logic [LD-1:0][3:0] lc;
    carry_count_x6 #(.N(MAXE), .LD(LD)) u_cnt (
      .own (exits[c]),
      .prev((c > 0) ? exits[(c > 0) ? c - 1 : 0] : '0),
      .l   (lc)
    );
    assign corr[c] = lc;
  end

  for (genvar c = 0; c < NCOL; c++) begin : g_dd
    logic [LD-1:0][3:0] land;   // correction digits that land on column c
    for (genvar j = 0; j < LD; j++) begin : g_land
      if (c >= j) begin : g_in
        assign land[j] = corr[c - j][j];
      end else begin : g_none
        assign land[j] = 4'd0;
      end
    end
    dec_digit_32 #(.LD(LD)) u_dd (
      .s   (s[c]),
      .h   (h[c]),
      .corr(land),
      .r   (r[c]),
      .q   (q[c])
    );
    assign b[c] = r[c];
    if (c == 0) begin : g_a0
      assign a[c] = 4'd6;
    end else begin : g_a
      assign a[c] = q[c-1] + 4'd6;
    end
  end

endmodule
