// tb_sd_recoder -- checks the signed-digit radix-10 recoding.
//
// For random and corner 8-digit multipliers it rebuilds Y from the
// recoded digits (sum of +/-magnitude * 10^k) and checks it equals the
// input, that each magnitude select is one-hot or zero, that zero digits
// are never marked negative, and that every recoded digit matches
// y_i - 10*(y_i >= 5) + (y_(i-1) >= 5) computed here.
module tb_sd_recoder;
  localparam int D = 8;
  logic [D-1:0][3:0] y;
  logic [D:0][5:1]   mag;
  logic [D:0]        sgn;
  int checks = 0, failures = 0;

  sd_recoder #(.NDIG(D)) dut (.y(y), .mag(mag), .sgn(sgn));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [D-1:0][3:0] v);
    longint val, ref_val, p10;
    int m, expect_d, cin;
    y = v;
    #1;
    val = 0; ref_val = 0; p10 = 1; cin = 0;
    for (int k = 0; k <= D; k++) begin
      m = 0;
      for (int n = 1; n <= 5; n++) if (mag[k][n]) m = n;
      checks++;
      if ($countones(mag[k]) > 1 || (m == 0 && sgn[k])) failures++;
      if (k < D) begin
        expect_d = int'(v[k]) - ((v[k] >= 5) ? 10 : 0) + cin;
        cin = (v[k] >= 5) ? 1 : 0;
        ref_val += longint'(v[k]) * p10;
      end else expect_d = cin;
      checks++;
      if ((sgn[k] ? -m : m) != expect_d) failures++;
      val += (sgn[k] ? -longint'(m) : longint'(m)) * p10;
      p10 *= 10;
    end
    checks++;
    if (val != ref_val) begin
      failures++;
      $display("MISMATCH y=%h recoded value %0d", v, val);
    end
  endtask

  initial begin
    logic [D-1:0][3:0] v;
    for (int dg = 0; dg < 10; dg++) begin
      for (int i = 0; i < D; i++) v[i] = 4'(dg);
      check_one(v);
    end
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < D; i++) v[i] = 4'($urandom_range(0, 9));
      check_one(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
