// csa_4b -- 4-bit binary 3:2 compressor for one ODDS digit column.
//
// ODDS digits are plain 4-bit binary numbers with values 0..15, so three
// digits of one decimal column are added bit-wise by four full adders:
//   a + b + c = s + hw + 16*cout
// where s is the sum word, hw the carry word shifted left by one inside
// the digit (bit 0 zero) and cout the carry out of bit 3. cout has weight
// 16 in this column; the reduction tree sends it on as a weight-1 bit of
// the next decimal column (worth 10) and adds the missing 6 back later
// (the x6 correction). Follows the source's binary carry-save scheme;
// purely combinational.
module csa_4b (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [3:0] c,
  output logic [3:0] s,
  output logic [3:0] hw,
  output logic       cout
);

  logic [3:0] cy;

  always_comb begin
    s    = a ^ b ^ c;
    cy   = (a & b) | (a & c) | (b & c);
    hw   = {cy[2:0], 1'b0};
    cout = cy[3];
  end

endmodule
