// tb_csa_4b -- exhaustive check of the 4-bit 3:2 compressor:
// a + b + c = s + hw + 16*cout for all 4096 input triples, with bit 0 of
// the carry word always zero.
module tb_csa_4b;
  logic [3:0] a, b, c, s, hw;
  logic       cout;
  int checks = 0, failures = 0;

  csa_4b dut (.a(a), .b(b), .c(c), .s(s), .hw(hw), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        for (int k = 0; k < 16; k++) begin
          a = 4'(i); b = 4'(j); c = 4'(k);
          #1;
          checks++;
          if (int'(s) + int'(hw) + 16 * int'(cout) != i + j + k || hw[0]) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
