// tb_dec_digit_32 -- checks the decimal digit 3:2 compressor: for random
// S, H in [0,15] and BCD correction digits, 10*q + r must equal their
// sum, with r a BCD digit and q at most 9.
module tb_dec_digit_32;
  localparam int LD = 3;
  logic [3:0]         s, h, r, q;
  logic [LD-1:0][3:0] corr;
  int checks = 0, failures = 0;

  dec_digit_32 #(.LD(LD)) dut (.s(s), .h(h), .corr(corr), .r(r), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int z;
    for (int n = 0; n < 5000; n++) begin
      s = 4'($urandom_range(0, 15));
      h = 4'($urandom_range(0, 15));
      z = int'(s) + int'(h);
      for (int j = 0; j < LD; j++) begin
        corr[j] = 4'($urandom_range(0, 9));
        z += int'(corr[j]);
      end
      #1;
      checks++;
      if (10 * int'(q) + int'(r) != z || r > 9 || q > 9) begin
        failures++;
        $display("MISMATCH z=%0d q=%0d r=%0d", z, q, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
