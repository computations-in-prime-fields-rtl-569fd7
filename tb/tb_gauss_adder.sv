// tb_gauss_adder: exhaustive check of gauss_adder for a = 3 (p = 13, the
// default), a = 2 (p = 5) and a = 5 (p = 41). Every pair of elements in the
// positive residue set is added, and the result is checked through the
// isomorphism with Z_p. Each of the three reductions must occur for each
// modulus. The run also reads the design's own reduction flags for the
// default instance and compares their counts with the reference.
module tb_gauss_adder;

  int c0, f0, a0, b0, e0, c1, f1, a1, b1, e1, c2, f2, a2, b2, e2;
  int d0, d1, d2;
  int h1 = 0, h2 = 0, h3 = 0;
  chk_gauss_adder          u3 (.checks(c0), .failures(f0), .n_red1(a0), .n_red2(b0), .n_red3(e0), .done(d0));
  chk_gauss_adder #(.A(2)) u2 (.checks(c1), .failures(f1), .n_red1(a1), .n_red2(b1), .n_red3(e1), .done(d1));
  chk_gauss_adder #(.A(5)) u5 (.checks(c2), .failures(f2), .n_red1(a2), .n_red2(b2), .n_red3(e2), .done(d2));
  // Design's reduction flags of the default instance, sampled per operand.
  always @(u3.x_re, u3.x_im, u3.y_re, u3.y_im) begin
    #0.5;
    if (!d0) begin
      if (u3.dut.red1) h1++;
      if (u3.dut.red2) h2++;
      if (u3.dut.red3) h3++;
    end
  end
  int checks = 0, failures = 0;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    while (!(d0 && d1 && d2)) #10;

    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    checks += 9;
    if (a0 == 0 || b0 == 0 || e0 == 0) failures++;
    if (a1 == 0 || b1 == 0 || e1 == 0) failures++;
    if (a2 == 0 || b2 == 0 || e2 == 0) failures++;
    if (a0 + b0 + e0 == 3 * c0) failures++;
    if (h1 != a0) failures++;
    if (h2 != b0) failures++;
    if (h3 != e0) failures++;
    if (c0 != 169) failures++;
    if (c1 != 25) failures++;
    $display("a=3: %0d sums; reductions 1/2/3 applied %0d/%0d/%0d times", c0, a0, b0, e0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
