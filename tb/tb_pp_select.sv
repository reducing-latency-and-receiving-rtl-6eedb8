// tb_pp_select -- checks partial-product selection and negation.
//
// Feeds random XS-3 multiples (digit codes 3..15) and every recoded digit
// in [-5,5]. For a positive digit the output must equal the selected
// multiple code for code (0X: all codes 3); for a negative one the
// inverted codes plus the hot one must give the ten's complement, i.e.
// value(pp) + hot = 10^(d+1) - value(multiple).
module tb_pp_select;
  localparam int D = 6;
  logic [5:0][D:0][3:0] mult;
  logic [5:1]           mag;
  logic                 neg;
  logic [D:0][3:0]      pp;
  logic                 hot;
  int checks = 0, failures = 0;

  pp_select #(.NDIG(D)) dut (.mult(mult), .mag(mag), .neg(neg), .pp(pp), .hot(hot));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint xs3_val(input logic [D:0][3:0] w);
    longint v, p10;
    v = 0; p10 = 1;
    for (int i = 0; i <= D; i++) begin v += (longint'(w[i]) - 3) * p10; p10 *= 10; end
    return v;
  endfunction

  initial begin
    longint sel_v, p10d;
    p10d = 1;
    for (int i = 0; i <= D; i++) p10d *= 10;
    for (int n = 0; n < 3000; n++) begin
      int dig;
      mult[0] = '0;
      for (int k = 1; k <= 5; k++)
        for (int i = 0; i <= D; i++) mult[k][i] = 4'($urandom_range(3, 15));
      dig = $urandom_range(0, 10) - 5;
      mag = '0;
      if (dig != 0) mag[(dig < 0) ? -dig : dig] = 1'b1;
      neg = (dig < 0);
      #1;
      sel_v = (dig == 0) ? 0 : xs3_val(mult[(dig < 0) ? -dig : dig]);
      checks++;
      if (dig >= 0) begin
        if (xs3_val(pp) != sel_v || hot) failures++;
        if (dig > 0 && pp != mult[dig]) failures++;
      end else begin
        if (xs3_val(pp) + longint'(hot) != p10d - sel_v) begin
          failures++;
          $display("MISMATCH digit %0d: pp value %0d", dig, xs3_val(pp));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
