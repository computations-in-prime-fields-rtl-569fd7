// tb_zp_adder: exhaustive check of zp_adder for p = 13 (the default), 5 and
// 41. Every operand pair is checked against (c + d) mod p. Both paths, with
// and without the subtraction of p, must be exercised for each prime.
module tb_zp_adder;

  int c0, f0, r0, c1, f1, r1, c2, f2, r2;
  int d0, d1, d2;
  chk_zp_adder            u13 (.checks(c0), .failures(f0), .n_reduced(r0), .done(d0));
  chk_zp_adder #(.P(5))   u5  (.checks(c1), .failures(f1), .n_reduced(r1), .done(d1));
  chk_zp_adder #(.P(41))  u41 (.checks(c2), .failures(f2), .n_reduced(r2), .done(d2));
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
    // Both paths taken for every prime.
    checks += 3;
    if (r0 == 0 || r0 == c0) failures++;
    if (r1 == 0 || r1 == c1) failures++;
    if (r2 == 0 || r2 == c2) failures++;
    // Exhaustive count: pairs with c+d >= p number p(p-1)/2.
    checks++;
    if (r0 != 13 * 12 / 2) failures++;
    $display("p=13: %0d sums, %0d reduced", c0, r0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
