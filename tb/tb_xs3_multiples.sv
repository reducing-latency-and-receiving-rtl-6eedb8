// tb_xs3_multiples -- checks the XS-3 multiplicand multiples.
//
// For corner and random 16-digit multiplicands it checks, for n = 1..5,
// that every digit code of nX lies in [3,15] (digit value in [0,12]) and
// that the value of nX, sum of (code-3)*10^i, equals n*X computed as an
// integer here.
module tb_xs3_multiples;
  localparam int D = 16;
  logic [D-1:0][3:0]      x;
  logic [5:0][D:0][3:0]   mult;
  int checks = 0, failures = 0;

  xs3_multiples #(.NDIG(D)) dut (.x(x), .mult(mult));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [D-1:0][3:0] v);
    longint xv, mv, p10;
    x = v;
    #1;
    xv = 0; p10 = 1;
    for (int i = 0; i < D; i++) begin xv += longint'(v[i]) * p10; p10 *= 10; end
    for (int n = 1; n <= 5; n++) begin
      mv = 0; p10 = 1;
      for (int i = 0; i <= D; i++) begin
        checks++;
        if (mult[n][i] < 3) failures++;
        mv += (longint'(mult[n][i]) - 3) * p10;
        p10 *= 10;
      end
      checks++;
      if (mv != longint'(n) * xv) begin
        failures++;
        $display("MISMATCH %0dX of %0d gave %0d", n, xv, mv);
      end
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
