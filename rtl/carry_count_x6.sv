// carry_count_x6 -- sum correction for one digit column of the reduction
// tree (second part of the partial-product reduction).
//
// The binary carry-save tree lets the carry out of bit 3 of every 4-bit
// compressor (weight 16) leave its column. Each such carry is worth 10 in
// the next column, so its own column lost 6 and the next column gained 1.
// This block counts the carries that left this column (own) and the ones
// that left the column to its right (prev) and forms the correction
//   L = 6 * popcount(own) + popcount(prev)
// as LD BCD digits; digit j of L is added at column c+j by dec_digit_32.
// The x6 product is built as 4n + 2n. The source names a carry-count block
// and an x6 module; the binary-count-then-convert structure is this
// design's simple stand-in for their gate-level form. Purely combinational.
//
// Interface: own, prev are carry bits (zero padding allowed);
// l holds L in BCD, digit 0 least significant.
module carry_count_x6 #(
  parameter int unsigned N  = 16,
  parameter int unsigned LD = 3
) (
  input  logic [N-1:0]      own,
  input  logic [N-1:0]      prev,
  output logic [LD-1:0][3:0] l
);

  localparam int unsigned CW = $clog2(N + 1);
  localparam int unsigned VW = CW + 3;

  logic [CW-1:0] n_own, n_prev;
  logic [VW-1:0] val;

  always_comb begin
    n_own  = '0;
    n_prev = '0;
    for (int i = 0; i < N; i++) begin
      n_own  += CW'(own[i]);
      n_prev += CW'(prev[i]);
    end
    val = ({3'b000, n_own} << 2) + ({3'b000, n_own} << 1) + VW'(n_prev);
  end

  always_comb begin
    logic [VW-1:0] rest;
    rest = val;
    for (int j = 0; j < LD; j++) begin
      l[j] = 4'(rest % VW'(10));
      rest = rest / VW'(10);
    end
  end

endmodule
