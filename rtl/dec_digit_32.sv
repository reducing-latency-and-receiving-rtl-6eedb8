// dec_digit_32 -- decimal digit 3:2 compressor of one product column (third
// part of the partial-product reduction).
//
// Adds the carry-save pair (S, H) left by the binary tree and the BCD
// digits of the sum corrections that land on this column, and splits the
// total into a BCD digit r and a transfer q for the next column:
//   z = S + H + sum_j corr[j] = 10*q + r,   r in [0,9]
// With corr holding at most 7 digits z <= 15 + 14 + 63 = 92, so q <= 9 is a
// single digit. The reduction tree then hands the final adder the digit
// pair B = r (BCD) and A = q_(c-1) + 6 (excess-6), whose plain binary sum
// produces the decimal carry directly. The A/B formats follow the source;
// the add-and-divide form of the compressor is this design's choice (the
// source does not give its gate-level form). Purely combinational.
module dec_digit_32 #(
  parameter int unsigned LD = 3
) (
  input  logic [3:0]         s,
  input  logic [3:0]         h,
  input  logic [LD-1:0][3:0] corr,
  output logic [3:0]         r,
  output logic [3:0]         q
);

  logic [6:0] z;

  always_comb begin
    z = 7'(s) + 7'(h);
    for (int j = 0; j < LD; j++) z += 7'(corr[j]);
    r = 4'(z % 7'd10);
    q = 4'(z / 7'd10);
  end

endmodule
