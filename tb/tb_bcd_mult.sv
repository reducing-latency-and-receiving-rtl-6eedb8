// tb_bcd_mult -- end-to-end test of the BCD multiplier at its default size
// (16 x 16 digits, the Decimal64 significand length).
//
// Drives corner operands (zero, all nines, all fives, single digits) and
// random BCD operands and compares the 32-digit product with a schoolbook
// digit-array multiplication done in the testbench. It also counts how
// often each mechanism of the design was exercised and fails if one never
// was: every multiple 0X..5X selected, negative partial products, recoding
// transfers, decimal carries leaving the binary CSA tree (and so the x6
// correction), and carries rippling through a propagate digit of the final
// adder. The multiplier is combinational, so every result is checked one
// time step after the operands change; a watchdog ends the run if it hangs.
module tb_bcd_mult;

  localparam int D  = 16;
  localparam int NV = 3000;

  logic [D-1:0][3:0]   x, y;
  logic [2*D-1:0][3:0] p;

  bcd_mult dut (.x(x), .y(y), .p(p));

  int checks = 0, failures = 0;
  int n_mag [6];
  int n_neg = 0, n_transfer = 0, n_exit = 0, n_ripple = 0;

  function automatic logic [2*D-1:0][3:0] ref_mul(input logic [D-1:0][3:0] a,
                                                  input logic [D-1:0][3:0] b);
    int acc [2*D+1];
    logic [2*D-1:0][3:0] r;
    for (int i = 0; i <= 2 * D; i++) acc[i] = 0;
    for (int i = 0; i < D; i++)
      for (int j = 0; j < D; j++) acc[i+j] += int'(a[i]) * int'(b[j]);
    for (int i = 0; i < 2 * D; i++) begin
      acc[i+1] += acc[i] / 10;
      r[i] = 4'(acc[i] % 10);
    end
    return r;
  endfunction

  // Independent signed-digit recoding, used only to count mechanisms.
  task automatic count_recoding(input logic [D-1:0][3:0] b);
    int c_in, v;
    c_in = 0;
    for (int i = 0; i <= D; i++) begin
      if (i < D) begin
        v = int'(b[i]) + c_in - ((b[i] >= 5) ? 10 : 0);
        if (b[i] >= 5) n_transfer++;
        c_in = (b[i] >= 5) ? 1 : 0;
      end else v = c_in;
      if (v < 0) begin n_neg++; v = -v; end
      n_mag[v]++;
    end
  endtask

  task automatic apply(input logic [D-1:0][3:0] a, input logic [D-1:0][3:0] b);
    logic [2*D-1:0][3:0] e;
    x = a;
    y = b;
    #1;
    e = ref_mul(a, b);
    checks++;
    if (p !== e) begin
      failures++;
      if (failures <= 5) $display("MISMATCH x=%h y=%h p=%h expected=%h", a, b, p, e);
    end
    count_recoding(b);
    if (dut.u_pprt.exits != '0) n_exit++;
    for (int i = 1; i < 2 * D; i++)
      if (dut.u_add.p0[i] && dut.u_add.cy[i]) begin n_ripple++; break; end
  endtask

  function automatic logic [D-1:0][3:0] rnd_bcd();
    logic [D-1:0][3:0] r;
    for (int i = 0; i < D; i++) r[i] = 4'($urandom_range(0, 9));
    return r;
  endfunction

  function automatic logic [D-1:0][3:0] fill(input logic [3:0] dg);
    logic [D-1:0][3:0] r;
    for (int i = 0; i < D; i++) r[i] = dg;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) n_mag[i] = 0;
    apply('0, '0);
    apply(fill(4'd9), fill(4'd9));
    apply(fill(4'd5), fill(4'd5));
    apply(fill(4'd9), fill(4'd5));
    apply(fill(4'd1), fill(4'd9));
    for (int dg = 0; dg < 10; dg++) begin
      apply(fill(4'd9), fill(4'(dg)));
      apply(fill(4'(dg)), fill(4'd7));
    end
    for (int n = 0; n < NV; n++) apply(rnd_bcd(), rnd_bcd());
    for (int i = 0; i <= 5; i++)
      if (n_mag[i] == 0) begin failures++; $display("multiple %0dX never selected", i); end
    if (n_neg == 0)      begin failures++; $display("no negative partial product"); end
    if (n_transfer == 0) begin failures++; $display("no recoding transfer"); end
    if (n_exit == 0)     begin failures++; $display("no decimal carry out of the CSA tree"); end
    if (n_ripple == 0)   begin failures++; $display("no carry through a propagate digit"); end
    $display("mechanisms: 0X..5X=%0d/%0d/%0d/%0d/%0d/%0d neg=%0d transfers=%0d tree-carries=%0d ripples=%0d",
             n_mag[0], n_mag[1], n_mag[2], n_mag[3], n_mag[4], n_mag[5], n_neg, n_transfer, n_exit, n_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
