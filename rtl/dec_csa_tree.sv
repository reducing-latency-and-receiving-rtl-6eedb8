// dec_csa_tree -- binary carry-save tree over the ODDS digit columns of the
// partial-product array (first part of the partial-product reduction).
//
// Every digit column is reduced with 4-bit binary 3:2 compressors (csa_4b),
// level after level, until it holds two words: a sum word S and a carry
// word H. Within a digit the ordinary binary rules apply. The carry out of
// bit 3 of a compressor (weight 16) leaves the column on 'exits'; it is a
// decimal carry into the next column, where it is worth 10, so the column
// lost 6 per carry. The sum correction (carry_count_x6) counts these
// carries and puts both effects back. For every column c
//   sum of inputs(c) = S(c) + H(c) + 16 * exits(c)
// and over the whole array, modulo 10^NCOL,
//   sum_c 10^c * inputs(c) = sum_c 10^c * (S(c) + H(c) + 6*exits(c) + exits(c-1)).
// Because carries never re-enter a tree, the columns are independent and
// the depth is set by the tallest column.
//
// The column heights follow from NDIG through the shape functions of
// bcd_mult_pkg; col_in[c][j] is driven for j < init_count(c) and the rest
// of each column is ignored. The source describes the tree as regular
// binary CSAs per digit column with carries counted between columns; the
// plain 3:2 (Wallace-style) grouping used here, instead of 4:2 and larger
// compressors with delay balancing, is this design's simplification.
//
// Interface: col_in, the array columns (4-bit ODDS words); s, h, the
// two words left per column; exits[c], the carry bits that left column c
// (zero-padded to MAXE). Purely combinational.
module dec_csa_tree
  import bcd_mult_pkg::*;
#(
  parameter int unsigned NDIG = 16,
  localparam int unsigned NCOL = 2 * NDIG,
  localparam int unsigned W0   = max_init(NDIG),
  localparam int unsigned NLEV = num_levels(NDIG),
  localparam int unsigned MW   = max_init(NDIG),
  localparam int unsigned MAXE = max_exits(NDIG)
) (
  input  logic [NCOL-1:0][W0-1:0][3:0] col_in,
  output logic [NCOL-1:0][3:0]         s,
  output logic [NCOL-1:0][3:0]         h,
  output logic [NCOL-1:0][MAXE-1:0]    exits
);

  logic [3:0] lv0 [NCOL][MW];          // the array columns, zero-padded
  logic       exv [NCOL][MAXE];        // carry bits out per column, all levels

  for (genvar c = 0; c < NCOL; c++) begin : g_in
    for (genvar j = 0; j < MW; j++) begin : g_w
      if (j < init_count(c, NDIG)) begin : g_used
        assign lv0[c][j] = col_in[c][j];
      end else begin : g_free
        assign lv0[c][j] = 4'd0;
      end
    end
  end

  // One generate block per level, each with its own word tables, so that
  // no array is both read and written by the same level.
  for (genvar l = 0; l < NLEV; l++) begin : g_lev
    logic [3:0] win  [NCOL][MW];
    logic [3:0] wout [NCOL][MW];

    if (l == 0) begin : g_first
      assign win = lv0;
    end else begin : g_next
      assign win = g_lev[l-1].wout;
    end

    for (genvar c = 0; c < NCOL; c++) begin : g_col
      localparam int CN = word_count(l, c, NDIG);
      localparam int G  = CN / 3;
      localparam int R  = CN % 3;

      for (genvar j = 0; j < G; j++) begin : g_csa
        csa_4b u_csa (
          .a   (win[c][3*j]),
          .b   (win[c][3*j+1]),
          .c   (win[c][3*j+2]),
          .s   (wout[c][2*j]),
          .hw  (wout[c][2*j+1]),
          .cout(exv[c][exit_offset(l, c, NDIG) + j])
        );
      end

      for (genvar j = 2 * G; j < MW; j++) begin : g_pass
        if (j < 2 * G + R) begin : g_keep
          assign wout[c][j] = win[c][3*G + j - 2*G];
        end else begin : g_free
          assign wout[c][j] = 4'd0;
        end
      end
    end
  end

  for (genvar c = 0; c < NCOL; c++) begin : g_out
    for (genvar e = exit_offset(NLEV, c, NDIG); e < MAXE; e++) begin : g_exfree
      assign exv[c][e] = 1'b0;
    end
    assign s[c] = g_lev[NLEV-1].wout[c][0];
    assign h[c] = g_lev[NLEV-1].wout[c][1];
    for (genvar e = 0; e < MAXE; e++) begin : g_expack
      assign exits[c][e] = exv[c][e];
    end
  end

endmodule
