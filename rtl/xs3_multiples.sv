// xs3_multiples -- carry-free generation of the positive multiplicand
// multiples 1X, 2X, 3X, 4X and 5X in the redundant excess-3 (XS-3) code.
//
// XS-3 here is a 4-bit code whose value is the binary value minus 3, so a
// code word holds a digit in [-3,12]. For a multiple nX every BCD digit x_i
// is split as n*x_i = 10*T_i + D_i with T_i = floor(n*x_i/10) and
// D_i = n*x_i mod 10, and the multiple digit is
//   nX_i = D_i + T_(i-1)          (code D_i + T_(i-1) + 3)
// Only the transfer T of the neighbouring digit is added, so there is no
// carry propagation. With this mapping nX_i stays in [0,12] for every n in
// 1..5 (largest: 4X, 8 + 3 = 11), inside the XS-3 digit range. The source
// states the carry-free rule and the range; the particular T/D mapping is
// this design's choice (the simplest one that meets the range).
// 1X is the multiplicand with 3 added to every digit; 0X (all codes 0011)
// is produced by the partial-product selector.
//
// Interface: x is d BCD digits; mult[n] is the multiple nX as d+1 XS-3
// digits (the top digit holds T_(d-1)); mult[0] is unused and zero.
// Purely combinational.
module xs3_multiples #(
  parameter int unsigned NDIG = 16
) (
  input  logic [NDIG-1:0][3:0] x,
  output logic [5:0][NDIG:0][3:0] mult
);

  always_comb begin
    mult[0] = '0;
    for (int n = 1; n <= 5; n++) begin
      logic [3:0] t_prev;
      t_prev = 4'd0;
      for (int i = 0; i <= NDIG; i++) begin
        logic [5:0] prod;
        logic [3:0] t, dd;
        prod = (i < NDIG) ? 6'(n) * {2'b00, x[i]} : 6'd0;
        t    = 4'(prod / 6'd10);
        dd   = 4'(prod % 6'd10);
        mult[n][i] = dd + t_prev + 4'd3;
        t_prev = t;
      end
    end
  end

endmodule
