// tb_workloads: runs each arithmetic unit at every prime for which gate
// counts are tabulated for this architecture.
//   zp_adder         : p = 5 ... 525313 (16 primes)
//   gauss_adder      : p = a^2 + (a-1)^2, a = 2 ... 513 (12 primes)
//   zp_multiplier    : p = 5 ... 97 (10 primes)
//   gauss_multiplier : 2+i, 3+2i, 4+i (p = 5, 13, 17)
// Primes below 200 are tested exhaustively, and larger ones with 2000
// random operand pairs plus the corner cases. Every unit must also show its
// reductions for each prime, except where the operand range makes one
// impossible: the Z_p product (at most (p-1)^2) never reaches 2^(n-1)*p for
// p = 5 and 17, and Gaussian
// products modulo 2+i never leave the representative set.
module tb_workloads;
  localparam int NZA = 16;
  localparam int unsigned PZA [NZA] = '{5, 13, 17, 29, 37, 41, 61, 73, 113, 181,
                                        313, 421, 2113, 3121, 4513, 525313};
  localparam int NGA = 12;
  localparam int AGA [NGA] = '{2, 3, 5, 6, 8, 10, 13, 15, 33, 40, 48, 513};
  localparam int NZM = 10;
  localparam int unsigned PZM [NZM] = '{5, 13, 17, 29, 37, 41, 61, 73, 89, 97};

  int za_c [NZA], za_f [NZA], za_r [NZA], za_d [NZA];
  int ga_c [NGA], ga_f [NGA], ga_1 [NGA], ga_2 [NGA], ga_3 [NGA], ga_d [NGA];
  int zm_c [NZM], zm_f [NZM], zm_s [NZM], zm_d [NZM];
  int gm_c [3], gm_f [3], gm_r [3], gm_d [3];

  for (genvar g = 0; g < NZA; g++) begin : g_za
    chk_zp_adder #(.P(PZA[g]), .RAND_N(PZA[g] < 200 ? 0 : 2000)) u (
      .checks(za_c[g]), .failures(za_f[g]), .n_reduced(za_r[g]), .done(za_d[g]));
  end
  for (genvar g = 0; g < NGA; g++) begin : g_ga
    chk_gauss_adder #(.A(AGA[g]), .RAND_N(AGA[g] <= 10 ? 0 : 2000)) u (
      .checks(ga_c[g]), .failures(ga_f[g]), .n_red1(ga_1[g]), .n_red2(ga_2[g]),
      .n_red3(ga_3[g]), .done(ga_d[g]));
  end
  for (genvar g = 0; g < NZM; g++) begin : g_zm
    chk_zp_multiplier #(.P(PZM[g])) u (
      .checks(zm_c[g]), .failures(zm_f[g]), .n_steps_seen(zm_s[g]), .done(zm_d[g]));
  end
  chk_gauss_multiplier #(.A(2), .B(1)) u_gm5  (.checks(gm_c[0]), .failures(gm_f[0]), .n_reduced(gm_r[0]), .done(gm_d[0]));
  chk_gauss_multiplier #(.A(3), .B(2)) u_gm13 (.checks(gm_c[1]), .failures(gm_f[1]), .n_reduced(gm_r[1]), .done(gm_d[1]));
  chk_gauss_multiplier #(.A(4), .B(1)) u_gm17 (.checks(gm_c[2]), .failures(gm_f[2]), .n_reduced(gm_r[2]), .done(gm_d[2]));

  int checks = 0, failures = 0;

  initial begin : watchdog
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int steps_possible(int unsigned p);
    int n;
    n = 0;
    for (int i = 0; i < $clog2(p); i++)
      if (longint'(p - 1) * (p - 1) >= (longint'(p) << i)) n++;
    return n;
  endfunction

  function automatic bit all_done();
    for (int g = 0; g < NZA; g++) if (za_d[g] != 1) return 1'b0;
    for (int g = 0; g < NGA; g++) if (ga_d[g] != 1) return 1'b0;
    for (int g = 0; g < NZM; g++) if (zm_d[g] != 1) return 1'b0;
    for (int g = 0; g < 3; g++)   if (gm_d[g] != 1) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    #1;
    while (!all_done()) #100;
    for (int g = 0; g < NZA; g++) begin
      checks += za_c[g] + 1; failures += za_f[g];
      if (za_r[g] == 0) failures++;
      $display("zp_adder         p=%0d: %0d sums, %0d failures", PZA[g], za_c[g], za_f[g]);
    end
    for (int g = 0; g < NGA; g++) begin
      checks += ga_c[g] + 1; failures += ga_f[g];
      if (ga_1[g] == 0 || ga_2[g] == 0 || ga_3[g] == 0) failures++;
      $display("gauss_adder      a=%0d (p=%0d): %0d sums, %0d failures", AGA[g],
               AGA[g] * AGA[g] + (AGA[g] - 1) * (AGA[g] - 1), ga_c[g], ga_f[g]);
    end
    for (int g = 0; g < NZM; g++) begin
      checks += zm_c[g] + 1; failures += zm_f[g];
      // Step i can only be taken when (p-1)^2 >= 2^i * p.
      if (zm_s[g] != steps_possible(PZM[g])) failures++;
      $display("zp_multiplier    p=%0d: %0d products, %0d failures", PZM[g], zm_c[g], zm_f[g]);
    end
    for (int g = 0; g < 3; g++) begin
      checks += gm_c[g] + 1; failures += gm_f[g];
      if ((g == 0) != (gm_r[g] == 0)) failures++;
      $display("gauss_multiplier case %0d: %0d products, %0d failures", g, gm_c[g], gm_f[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
