// tb_dec_csa_tree -- checks the binary carry-save tree for 8-digit
// operands (16 columns, tallest column 10 words).
//
// Fills every used slot of the array with a random 4-bit word and checks,
// column by column, that the words in equal S + H + 16 * (carries out),
// that bit 0 of H (a shifted carry word) is zero whenever the column was
// compressed, and that no carry bit beyond the column's compressor count
// is ever set.
module tb_dec_csa_tree;
  import bcd_mult_pkg::*;
  localparam int D    = 8;
  localparam int NC   = 2 * D;
  localparam int W0   = max_init(D);
  localparam int MAXE = max_exits(D);

  logic [NC-1:0][W0-1:0][3:0] col_in;
  logic [NC-1:0][3:0]         s, h;
  logic [NC-1:0][MAXE-1:0]    exits;
  int checks = 0, failures = 0;
  int seen_exit = 0;

  dec_csa_tree #(.NDIG(D)) dut (.col_in(col_in), .s(s), .h(h), .exits(exits));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int c = 0; c < NC; c++)
        for (int j = 0; j < W0; j++)
          col_in[c][j] = (j < init_count(c, D)) ? 4'($urandom_range(0, 15)) : 4'd0;
      if (n == 0) col_in = '1;
      #1;
      for (int c = 0; c < NC; c++) begin
        int tot, ne;
        tot = 0;
        for (int j = 0; j < init_count(c, D); j++) tot += int'(col_in[c][j]);
        ne = $countones(exits[c]);
        seen_exit += ne;
        checks++;
        if (tot != int'(s[c]) + int'(h[c]) + 16 * ne) begin
          failures++;
          $display("MISMATCH column %0d: in %0d, S %0d H %0d carries %0d", c, tot, s[c], h[c], ne);
        end
        for (int e = exit_offset(num_levels(D), c, D); e < MAXE; e++) begin
          checks++;
          if (exits[c][e]) failures++;
        end
      end
    end
    checks++;
    if (seen_exit == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
