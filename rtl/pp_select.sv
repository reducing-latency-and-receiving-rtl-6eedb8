// pp_select -- partial-product generator for one recoded multiplier digit.
//
// Selects one of the precomputed positive multiples 0X..5X with the one-hot
// magnitude select of the recoded digit, and negates it when the digit is
// negative by inverting every bit. Because XS-3 is self-complementing,
// inverting a code word gives the XS-3 code of the nine's complement of
// its digit, so the selected word becomes the nine's complement of the
// multiple; the +1 that completes the ten's complement leaves as 'hot' and
// is added in the reduction tree at the partial product's least
// significant column. The method follows the source; the and-or multiplexer
// and the separate hot-one output are this design's choices.
//
// Interface: mult[n] are the multiples nX (n = 1..5, XS-3, d+1 digits),
// mag the one-hot magnitude (all zero selects 0X), neg the sign.
// pp is the partial product in XS-3, hot the ten's-complement increment
// (equal to neg). Purely combinational.
module pp_select #(
  parameter int unsigned NDIG = 16
) (
  input  logic [5:0][NDIG:0][3:0] mult,
  input  logic [5:1]              mag,
  input  logic                    neg,
  output logic [NDIG:0][3:0]      pp,
  output logic                    hot
);

  always_comb begin
    logic [NDIG:0][3:0] sel;
    for (int i = 0; i <= NDIG; i++) begin
      sel[i] = (mag == 5'b0) ? 4'd3 : 4'd0;   // 0X in XS-3
      for (int n = 1; n <= 5; n++)
        sel[i] |= mult[n][i] & {4{mag[n]}};
      pp[i] = sel[i] ^ {4{neg}};
    end
    hot = neg;
  end

endmodule
