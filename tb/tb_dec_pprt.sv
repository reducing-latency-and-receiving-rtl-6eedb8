// tb_dec_pprt -- checks the whole reduction tree for 8-digit operands.
//
// Feeds nine random XS-3 partial products (any 4-bit codes) with random
// signs and checks that the output pair satisfies
//   sum_c 10^c * (A_c - 6 + B_c) = sum_k 10^k * PP_k   (mod 10^16)
// where PP_k = sum_i (code_i - 3)*10^i, and for a negative one
// PP_k = that + 1 - 10^(d+1) (inverted codes plus the hot one). It also
// checks that every B digit is BCD, every A digit in [6,15] and every
// digit sum A-6+B at most 18, as the final adder requires.
module tb_dec_pprt;
  localparam int D  = 8;
  localparam int NC = 2 * D;

  logic [D:0][D:0][3:0] pp;
  logic [D:0]           hot;
  logic [NC-1:0][3:0]   a, b;
  int checks = 0, failures = 0;

  dec_pprt #(.NDIG(D)) dut (.pp(pp), .hot(hot), .a(a), .b(b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint modv, e, got, p10, pk, p10d1;
    modv = 1;
    for (int i = 0; i < NC; i++) modv *= 10;
    p10d1 = 1;
    for (int i = 0; i <= D; i++) p10d1 *= 10;
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k <= D; k++) begin
        hot[k] = 1'($urandom);
        for (int i = 0; i <= D; i++)
          pp[k][i] = (n == 0) ? 4'd15 : (n == 1) ? 4'd0 : 4'($urandom_range(0, 15));
      end
      #1;
      e = 0;
      p10 = 1;
      for (int k = 0; k <= D; k++) begin
        longint q10;
        pk = 0; q10 = 1;
        for (int i = 0; i <= D; i++) begin pk += (longint'(pp[k][i]) - 3) * q10; q10 *= 10; end
        if (hot[k]) pk = pk + 1 - p10d1;
        e = (e + (pk % modv) * (p10 % modv)) % modv;   // p10 * pk stays below 2^63
        p10 *= 10;
      end
      e = ((e % modv) + modv) % modv;
      got = 0; p10 = 1;
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (b[c] > 9 || a[c] < 6 || int'(a[c]) - 6 + int'(b[c]) > 18) failures++;
        got += (longint'(a[c]) - 6 + longint'(b[c])) * p10;
        p10 *= 10;
      end
      got = got % modv;
      checks++;
      if (got != e) begin
        failures++;
        if (failures < 5) $display("MISMATCH got %0d expected %0d", got, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
