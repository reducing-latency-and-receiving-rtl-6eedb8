// bcd_mult_pkg -- shared types and elaboration-time helpers of the decimal
// parallel multiplier.
//
// The multiplier reduces a partial-product array whose shape depends only on
// the operand length d (NDIG). The functions below describe that shape so
// that the reduction tree can be generated structurally:
//   * which rows cover a digit column (partial products, sign-extension
//     digits, ten's-complement "hot ones", the XS-3 -> ODDS constant),
//   * how many 4-bit words each column holds after every 3:2 level of the
//     binary carry-save tree, and how many decimal carries leave it,
//   * the digits of the constant that turns every XS-3 digit of the array
//     into an ODDS digit and closes the sign extension.
// All functions are constant functions: they are only evaluated while the
// design is elaborated and produce no logic.
//
// Array layout (this design's own choice, the source text only outlines it):
//   row k (k = 0..d): partial product PP[k], d+1 XS-3 digits at columns
//     k..k+d;
//   constant row: one digit per column, the BCD digit C of the constant
//     (see odds_const_digit) merged with the one other single-bit entry of
//     that column: the ten's-complement hot one s_c (columns 0..d, word
//     C + s_c) or the sign-extension bit ~s_k of row k = c-d-1 (columns
//     d+1..2d-1, word C + 1 - s_k). Both are a choice between two
//     constants, so the merge costs no adder.
// Only the 2d product columns are kept: the product of two d-digit operands
// is below 10^(2d), so all arithmetic is done modulo 10^(2d).
package bcd_mult_pkg;

  typedef logic [3:0] digit_t;

  // Bound on the tree depth searched by num_levels.
  localparam int unsigned MAX_LEVELS = 40;


  // Number of partial-product digits (rows k with k <= c <= k+d) in column c.
  function automatic int pp_rows(input int c, input int d);
    int lo, hi;
    lo = (c - d > 0) ? c - d : 0;
    hi = (c < d) ? c : d;
    return (hi >= lo) ? hi - lo + 1 : 0;
  endfunction

  // Index of the first partial-product row in column c.
  function automatic int pp_first_row(input int c, input int d);
    return (c - d > 0) ? c - d : 0;
  endfunction

  // Column c holds the sign-extension bit of row c-d-1.
  function automatic bit has_ext(input int c, input int d);
    return (c >= d + 1) && (c <= 2 * d + 1);
  endfunction

  // Column c holds the hot one of row c.
  function automatic bit has_hot(input int c, input int d);
    return c <= d;
  endfunction

  // Words in column c before the first 3:2 level: the partial-product
  // digits and the merged constant word.
  function automatic int init_count(input int c, input int d);
    return pp_rows(c, d) + 1;
  endfunction

  // Words left of an h-word column after 'lev' levels of 4-bit 3:2
  // compressors: each level cuts the column into groups of three words,
  // every group leaves a sum word and a shifted-carry word, and the rest
  // passes unchanged. Decimal carries do not re-enter the tree (they are
  // counted by the sum correction instead), so columns are independent.
  function automatic int words_after(input int lev, input int h);
    int cnt;
    cnt = h;
    for (int l = 0; l < lev; l++) cnt = 2 * (cnt / 3) + cnt % 3;
    return cnt;
  endfunction

  function automatic int word_count(input int lev, input int c, input int d);
    return words_after(lev, init_count(c, d));
  endfunction

  // Tallest column of the initial array.
  function automatic int max_init(input int d);
    int m;
    m = 1;
    for (int i = 0; i < 2 * d; i++) if (init_count(i, d) > m) m = init_count(i, d);
    return m;
  endfunction

  // Number of 3:2 levels until every column is down to two words.
  function automatic int num_levels(input int d);
    int lev;
    lev = 0;
    while (words_after(lev, max_init(d)) > 2 && lev < MAX_LEVELS) lev++;
    return lev;
  endfunction

  // Carry bits leaving column c in the levels before 'lev' (one per 3:2).
  function automatic int exit_offset(input int lev, input int c, input int d);
    int s;
    s = 0;
    for (int l = 0; l < lev; l++) s += word_count(l, c, d) / 3;
    return s;
  endfunction

  // Largest number of carry bits any column can send: every 3:2 compressor
  // removes one word, so an h-word column has h-2 of them.
  function automatic int max_exits(input int d);
    return (max_init(d) > 3) ? max_init(d) - 2 : 1;
  endfunction

  // Digit c of the constant row, as a BCD digit. The constant is
  //   -3 * (sum of 10^(i+k), k = 0..d, i = 0..d)   XS-3 -> ODDS (each digit -3)
  //   -    (sum of 10^(d+1+k), k = 0..d)           sign extension closure
  // reduced modulo 10^(2d).
  function automatic int odds_const_digit(input int c, input int d);
    int v, carry, dig, res;
    carry = 0;
    res = 0;
    for (int i = 0; i < 2 * d; i++) begin
      v = carry - 3 * pp_rows(i, d) - int'(has_ext(i, d));
      dig = ((v % 10) + 10) % 10;
      carry = (v - dig) / 10;
      if (i == c) res = dig;
    end
    return res;
  endfunction

  // Number of decimal digits needed for 7 * n (6 * n carries out of a
  // column plus n carries into it).
  function automatic int dec_digits_x6(input int n);
    int v, k;
    v = 7 * n;
    k = 1;
    while (v >= 10) begin
      v = v / 10;
      k++;
    end
    return k;
  endfunction

  // Bits needed to count 0..n.
  function automatic int count_bits(input int n);
    return (n < 1) ? 1 : $clog2(n + 1);
  endfunction

endpackage
