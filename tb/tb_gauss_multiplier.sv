// tb_gauss_multiplier: exhaustive check of gauss_multiplier for the three
// moduli 3+2i (p = 13, the default), 2+i (p = 5) and 4+i (p = 17). Every
// pair of least-norm representatives is multiplied. The result must map to
// the Z_p product and be a least-norm element of its class. Products that
// needed a reduction must occur for each modulus.
module tb_gauss_multiplier;

  int c0, f0, r0, c1, f1, r1, c2, f2, r2;
  int d0, d1, d2;
  chk_gauss_multiplier                   u13 (.checks(c0), .failures(f0), .n_reduced(r0), .done(d0));
  chk_gauss_multiplier #(.A(2), .B(1))   u5  (.checks(c1), .failures(f1), .n_reduced(r1), .done(d1));
  chk_gauss_multiplier #(.A(4), .B(1))   u17 (.checks(c2), .failures(f2), .n_reduced(r2), .done(d2));
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
    checks += 5;
    // For p = 5 every product of 0, +-1, +-i is already least-norm.
    if (r0 == 0 || r2 == 0 || r1 != 0) failures++;
    if (c0 != 169) failures++;
    if (c1 != 25) failures++;
    if (c2 < 289) failures++;
    if (r0 == c0) failures++;
    $display("p=13: %0d products, %0d needed reduction; p=17: %0d operand pairs", c0, r0, c2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
