// tb_bcd_qt_adder -- checks the final BCD adder at its default width
// (32 digits). Operands are an excess-6 word A (digit + 6) and a BCD word
// B with digit sums up to 18; the sum is compared with a digit-serial
// decimal addition done here. Long carry chains (all digit sums 9 with a
// generate at the bottom) are forced as well as random cases.
module tb_bcd_qt_adder;
  localparam int D = 32;
  logic [D-1:0][3:0] a, b, sum;
  logic              cout;
  int checks = 0, failures = 0;

  bcd_qt_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [D-1:0][3:0] ad, input logic [D-1:0][3:0] bd);
    int c, t;
    logic [D-1:0][3:0] e;
    a = ad; b = bd;
    #1;
    c = 0;
    for (int i = 0; i < D; i++) begin
      t = int'(ad[i]) - 6 + int'(bd[i]) + c;
      e[i] = 4'(t % 10);
      c = t / 10;
    end
    checks++;
    if (sum != e || cout != c[0]) begin
      failures++;
      $display("MISMATCH a=%h b=%h sum=%h expected=%h", ad, bd, sum, e);
    end
  endtask

  initial begin
    logic [D-1:0][3:0] ad, bd;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < D; i++) begin
        int q, r;
        q = $urandom_range(0, 9);
        r = $urandom_range(0, 9);
        if (n % 3 == 1) r = 9 - q;          // many propagate digits
        ad[i] = 4'(q + 6);
        bd[i] = 4'(r);
      end
      if (n % 3 == 1) begin ad[0] = 4'd15; bd[0] = 4'd9; end
      check_one(ad, bd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
