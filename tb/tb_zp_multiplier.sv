// tb_zp_multiplier: exhaustive check of zp_multiplier for p = 13 (the
// default), 5 and 97. Every operand pair is checked against x*y mod p, and
// every one of the n reduction steps must be taken at least once.
module tb_zp_multiplier;

  int c0, f0, s0, c1, f1, s1, c2, f2, s2;
  int d0, d1, d2;
  chk_zp_multiplier           u13 (.checks(c0), .failures(f0), .n_steps_seen(s0), .done(d0));
  chk_zp_multiplier #(.P(5))  u5  (.checks(c1), .failures(f1), .n_steps_seen(s1), .done(d1));
  chk_zp_multiplier #(.P(97)) u97 (.checks(c2), .failures(f2), .n_steps_seen(s2), .done(d2));
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
    checks += 3;
    if (s0 != 4) failures++;
    if (s1 != 2) failures++;  // for p = 5 the product never reaches 4p, so step 2 is idle
    if (s2 != 7) failures++;
    $display("p=13: %0d products, %0d of 4 reduction steps used", c0, s0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
