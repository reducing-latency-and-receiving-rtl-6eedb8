// bcd_mult -- d x d-digit BCD parallel multiplier, P = X * Y.
//
// Main idea: generate all partial products at once from a signed-digit
// radix-10 recoding of the multiplier, keep them in the self-complementing
// excess-3 code so that negative ones cost only an inversion, and reduce
// them with binary carry-save hardware by reading every digit as an
// overloaded decimal (ODDS, digit set [0,15]) digit. Stages:
//   sd_recoder     Y -> d+1 signed digits in [-5,5] (one-hot magnitude, sign)
//   xs3_multiples  X -> 1X..5X in XS-3, carry-free
//   pp_select      per recoded digit: pick the multiple, invert if negative
//   dec_pprt       XS-3 -> ODDS constant, binary CSA tree, carry count and
//                  x6 correction, decimal digit 3:2 -> A (excess-6), B (BCD)
//   bcd_qt_adder   prefix / carry-select BCD adder -> P
// The stage structure, codes and digit sets follow the source; layout and
// gate-level details are this design's own (see the sub-modules).
//
// Interface: x, y are NDIG BCD digits (digit 0 least significant), p the
// 2*NDIG-digit BCD product. The multiplier is purely combinational: the
// product is valid one propagation delay after the operands; registers
// around it are left to the surrounding design. NDIG defaults to 16
// (Decimal64 significands); 34 gives the Decimal128 size.
module bcd_mult #(
  parameter int unsigned NDIG = 16
) (
  input  logic [NDIG-1:0][3:0]   x,
  input  logic [NDIG-1:0][3:0]   y,
  output logic [2*NDIG-1:0][3:0] p
);

  logic [NDIG:0][5:1]        mag;
  logic [NDIG:0]             neg;
  logic [5:0][NDIG:0][3:0]   mult;
  logic [NDIG:0][NDIG:0][3:0] pp;
  logic [NDIG:0]             hot;
  logic [2*NDIG-1:0][3:0]    a, b;
  logic                      cout;

  sd_recoder #(.NDIG(NDIG)) u_rec (
    .y  (y),
    .mag(mag),
    .sgn(neg)
  );

  xs3_multiples #(.NDIG(NDIG)) u_mult (
    .x   (x),
    .mult(mult)
  );

  for (genvar k = 0; k <= NDIG; k++) begin : g_ppg
    pp_select #(.NDIG(NDIG)) u_sel (
      .mult(mult),
      .mag (mag[k]),
      .neg (neg[k]),
      .pp  (pp[k]),
      .hot (hot[k])
    );
  end

  dec_pprt #(.NDIG(NDIG)) u_pprt (
    .pp (pp),
    .hot(hot),
    .a  (a),
    .b  (b)
  );

  bcd_qt_adder #(.NDIG(2 * NDIG)) u_add (
    .a   (a),
    .b   (b),
    .sum (p),
    .cout(cout)
  );

endmodule
