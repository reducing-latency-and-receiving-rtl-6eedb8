// bcd_qt_adder -- final carry-propagate adder of the multiplier: adds an
// excess-6 operand A and a BCD operand B digit by digit and returns the
// non-redundant BCD sum.
//
// Because A already carries the +6 of the decimal correction, the 5-bit
// binary sum t = A_i + B_i of a digit tells the decimal carry directly:
//   generate  g_i = t_i >= 16     (A_i - 6 + B_i >= 10)
//   propagate p_i = t_i == 15     (A_i - 6 + B_i == 9)
// A parallel prefix tree (Kogge-Stone over the digits) computes the
// carry into every digit, while each digit computes both of its possible
// results off the critical path (carry-in 0 and 1) and the carry selects
// one: a hybrid prefix / carry-select adder, as the source describes. The
// digit of a conditional sum u is u-16 when u >= 16 and u-6 otherwise. The
// Kogge-Stone topology is this design's choice; the source only says that
// several prefix topologies were weighed.
//
// Interface: a[i] in [6,15], b[i] in [0,9] with a[i]-6+b[i] <= 18 (the
// reduction tree guarantees it); sum is BCD, cout the carry out of the
// top digit (zero for a product). Purely combinational.
module bcd_qt_adder #(
  parameter int unsigned NDIG = 32
) (
  input  logic [NDIG-1:0][3:0] a,
  input  logic [NDIG-1:0][3:0] b,
  output logic [NDIG-1:0][3:0] sum,
  output logic                 cout
);

  localparam int unsigned NST = (NDIG > 1) ? $clog2(NDIG) : 1;

  logic [NDIG-1:0]      g0, p0;
  logic [NDIG-1:0][3:0] s0, s1;
  logic [NDIG:0]        cy;

  always_comb begin
    for (int i = 0; i < NDIG; i++) begin
      logic [4:0] t, u;
      t     = 5'(a[i]) + 5'(b[i]);
      u     = t + 5'd1;
      g0[i] = t[4];
      p0[i] = (t == 5'd15);
      s0[i] = t[4] ? t[3:0] : t[3:0] - 4'd6;
      s1[i] = u[4] ? u[3:0] : u[3:0] - 4'd6;
    end
  end

  // Kogge-Stone prefix over the digit (g, p) pairs.
  for (genvar k = 0; k <= NST; k++) begin : g_st
    logic [NDIG-1:0] gg, pp;
    if (k == 0) begin : g_init
      assign gg = g0;
      assign pp = p0;
    end else begin : g_step
      localparam int unsigned D = 1 << (k - 1);
      for (genvar i = 0; i < NDIG; i++) begin : g_dig
        if (i >= D) begin : g_comb
          assign gg[i] = g_st[k-1].gg[i] | (g_st[k-1].pp[i] & g_st[k-1].gg[i-D]);
          assign pp[i] = g_st[k-1].pp[i] & g_st[k-1].pp[i-D];
        end else begin : g_pass
          assign gg[i] = g_st[k-1].gg[i];
          assign pp[i] = g_st[k-1].pp[i];
        end
      end
    end
  end

  assign cy[0] = 1'b0;
  for (genvar i = 0; i < NDIG; i++) begin : g_sel
    assign cy[i+1] = g_st[NST].gg[i];
    assign sum[i]  = cy[i] ? s1[i] : s0[i];
  end
  assign cout = cy[NDIG];

endmodule
