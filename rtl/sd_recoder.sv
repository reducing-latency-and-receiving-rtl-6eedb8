// sd_recoder -- signed-digit radix-10 recoding of the BCD multiplier.
//
// Every BCD digit y_i of the multiplier is rewritten as a digit in [-5,5]
// without any carry propagation:
//   yc_i = (y_i >= 5)                     transfer to the next digit
//   Yb_i = y_i - 10*yc_i + yc_(i-1)       recoded digit, in [-5,5]
// and the transfer out of the top digit becomes one more recoded digit
// Yb_d = yc_(d-1), in {0,1}. Y = sum Yb_k * 10^k, so d+1 partial products
// result. The recoding rule and digit set follow the source; the output
// format is this design's choice: each recoded digit leaves as a one-hot
// magnitude select (mag[k][n] = 1 selects the multiple nX, n = 1..5, all
// zero selects 0X) and a sign bit that is set only for negative digits,
// so a zero digit is always positive.
//
// Interface: y is d BCD digits (digit 0 least significant). Purely
// combinational, one digit-slice of logic per digit.
module sd_recoder #(
  parameter int unsigned NDIG = 16
) (
  input  logic [NDIG-1:0][3:0] y,
  output logic [NDIG:0][5:1]   mag,
  output logic [NDIG:0]        sgn
);

  logic [NDIG:0] yc;   // yc[i+1] is the transfer out of digit i

  always_comb begin
    yc[0] = 1'b0;
    for (int i = 0; i < NDIG; i++) yc[i+1] = (y[i] >= 4'd5);
  end

  always_comb begin
    for (int i = 0; i <= NDIG; i++) begin
      logic signed [5:0] v;
      logic [2:0] m;
      if (i < NDIG) v = $signed({2'b00, y[i]}) - (yc[i+1] ? 6'sd10 : 6'sd0) + $signed({5'b0, yc[i]});
      else          v = $signed({5'b0, yc[i]});
      sgn[i] = v[5];
      m      = v[5] ? 3'(-v) : 3'(v);
      for (int n = 1; n <= 5; n++) mag[i][n] = (m == 3'(n));
    end
  end

endmodule
