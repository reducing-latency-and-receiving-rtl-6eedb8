// tb_carry_count_x6 -- checks the sum correction: for random carry vectors
// the BCD digits on l must equal 6*popcount(own) + popcount(prev),
// counted here with a loop. Includes the all-ones extreme.
module tb_carry_count_x6;
  localparam int N = 16, LD = 3;
  logic [N-1:0]       own, prev;
  logic [LD-1:0][3:0] l;
  int checks = 0, failures = 0;

  carry_count_x6 #(.N(N), .LD(LD)) dut (.own(own), .prev(prev), .l(l));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [N-1:0] o, input logic [N-1:0] pv);
    int e, got, p10;
    own = o; prev = pv;
    #1;
    e = 0;
    for (int i = 0; i < N; i++) e += 6 * int'(o[i]) + int'(pv[i]);
    got = 0; p10 = 1;
    for (int j = 0; j < LD; j++) begin
      checks++;
      if (l[j] > 9) failures++;
      got += int'(l[j]) * p10;
      p10 *= 10;
    end
    checks++;
    if (got != e) begin
      failures++;
      $display("MISMATCH own=%b prev=%b got %0d expected %0d", o, pv, got, e);
    end
  endtask

  initial begin
    check_one('0, '0);
    check_one('1, '1);
    check_one('1, '0);
    for (int n = 0; n < 3000; n++) check_one(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
