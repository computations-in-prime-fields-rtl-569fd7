// tb_gf_arith_top: end-to-end test of gf_arith_top at its default size
// (p = 13 = 3^2 + 2^2, modulus 3+2i).
//
// Phase 1 checks every Z_p operand pair for sum and product against integer
// arithmetic. Phase 2 adds every pair of positive-representation Gaussian
// elements. At the same time it feeds their images phi(x), phi(y) to the
// Z_p adder, and both the Gaussian result and the Z_p result must map to the
// same residue. Phase 3 does the same for products: every pair of least-norm
// elements goes through the Gaussian multiplier and, mapped, through the Z_p
// multiplier. The map phi(u+vi) = u + k*v mod p uses a k found here by search
// (a + k*b = 0 mod p), not taken from the design.
//
// Mechanisms counted, each of which must occur: Z_p addition with and
// without the subtraction of p; each of the 4 reduction steps of the Z_p
// multiplier; each of the 3 reductions of the Gaussian adder; Gaussian
// products that need reducing, and ones that do not.
module tb_gf_arith_top;
  localparam int A = 3, B = 2, P = 13, N = 4, NRE = 3, NIM = 2, W = 3;

  logic [N-1:0]        zp_c, zp_d, zp_sum, zp_prod;
  logic [NRE-1:0]      gp_x_re, gp_y_re, gp_sum_re;
  logic [NIM-1:0]      gp_x_im, gp_y_im, gp_sum_im;
  logic signed [W-1:0] gm_x_re, gm_x_im, gm_y_re, gm_y_im, gm_prod_re, gm_prod_im;

  gf_arith_top dut (.*);

  int checks = 0, failures = 0;
  int k;
  int min_norm [P];
  int n_add_red = 0, n_add_plain = 0;
  int n_mul_step [N];
  int n_g_red [3];
  int n_gm_red = 0, n_gm_plain = 0;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int phi(int re, int im);
    int r;
    r = (re + k * im) % P;
    if (r < 0) r += P;
    return r;
  endfunction

  function automatic bit in_pos_set(int re, int im);
    if (im < 0 || re < 0 || im > A - 1) return 1'b0;
    if (im < B) return re <= A + B - 1;
    return re <= A - 1;
  endfunction

  function automatic bit is_rep(int re, int im);
    return re * re + im * im == min_norm[phi(re, im)];
  endfunction

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    int ur, ui;
    k = 0;
    while ((A + k * B) % P != 0) k++;
    for (int i = 0; i < N; i++) n_mul_step[i] = 0;
    for (int i = 0; i < 3; i++) n_g_red[i] = 0;
    for (int r = 0; r < P; r++) min_norm[r] = 1 << 30;
    for (int re = -4; re <= 3; re++)
      for (int im = -4; im <= 3; im++)
        if (re * re + im * im < min_norm[phi(re, im)]) min_norm[phi(re, im)] = re * re + im * im;
    gp_x_re = '0; gp_x_im = '0; gp_y_re = '0; gp_y_im = '0;
    gm_x_re = '0; gm_x_im = '0; gm_y_re = '0; gm_y_im = '0;

    // Phase 1: Z_p arithmetic.
    for (int c = 0; c < P; c++)
      for (int d = 0; d < P; d++) begin
        zp_c = N'(c); zp_d = N'(d);
        #1;
        expect_eq("zp sum", int'(zp_sum), (c + d) % P);
        expect_eq("zp product", int'(zp_prod), (c * d) % P);
        if (dut.u_zp_add.ge_p) n_add_red++; else n_add_plain++;
        if (dut.u_zp_mul.g_red[3].ge) n_mul_step[3]++;
        if (dut.u_zp_mul.g_red[2].ge) n_mul_step[2]++;
        if (dut.u_zp_mul.g_red[1].ge) n_mul_step[1]++;
        if (dut.u_zp_mul.g_red[0].ge) n_mul_step[0]++;
      end

    // Phase 2: Gaussian addition against Z_p addition.
    for (int xr = 0; xr <= A + B - 1; xr++)
      for (int xi = 0; xi < A; xi++)
        for (int yr = 0; yr <= A + B - 1; yr++)
          for (int yi = 0; yi < A; yi++)
            if (in_pos_set(xr, xi) && in_pos_set(yr, yi)) begin
              gp_x_re = NRE'(xr); gp_x_im = NIM'(xi);
              gp_y_re = NRE'(yr); gp_y_im = NIM'(yi);
              zp_c = N'(phi(xr, xi)); zp_d = N'(phi(yr, yi));
              #1;
              checks++;
              if (!in_pos_set(int'(gp_sum_re), int'(gp_sum_im))) begin
                failures++;
                $display("FAIL gauss sum %0d+%0di outside the residue set", gp_sum_re, gp_sum_im);
              end
              expect_eq("gauss sum vs zp sum", phi(int'(gp_sum_re), int'(gp_sum_im)), int'(zp_sum));
              if (dut.u_gauss_add.red1) n_g_red[0]++;
              if (dut.u_gauss_add.red2) n_g_red[1]++;
              if (dut.u_gauss_add.red3) n_g_red[2]++;
            end

    // Phase 3: Gaussian multiplication against Z_p multiplication.
    for (int c = -4; c <= 3; c++)
      for (int d = -4; d <= 3; d++)
        for (int e = -4; e <= 3; e++)
          for (int f = -4; f <= 3; f++)
            if (is_rep(c, d) && is_rep(e, f)) begin
              gm_x_re = W'(c); gm_x_im = W'(d); gm_y_re = W'(e); gm_y_im = W'(f);
              zp_c = N'(phi(c, d)); zp_d = N'(phi(e, f));
              #1;
              checks++;
              if (!is_rep(int'(gm_prod_re), int'(gm_prod_im))) begin
                failures++;
                $display("FAIL gauss product %0d,%0di is not least-norm", gm_prod_re, gm_prod_im);
              end
              expect_eq("gauss product vs zp product", phi(int'(gm_prod_re), int'(gm_prod_im)), int'(zp_prod));
              ur = c * e - d * f; ui = c * f + d * e;
              if (ur < -4 || ur > 3 || ui < -4 || ui > 3 || !is_rep(ur, ui)) n_gm_red++;
              else n_gm_plain++;
            end

    $display("zp add: %0d reduced, %0d plain", n_add_red, n_add_plain);
    $display("zp mul steps 3..0 taken: %0d %0d %0d %0d", n_mul_step[3], n_mul_step[2], n_mul_step[1], n_mul_step[0]);
    $display("gauss add reductions 1..3: %0d %0d %0d", n_g_red[0], n_g_red[1], n_g_red[2]);
    $display("gauss mul: %0d reduced, %0d already least-norm", n_gm_red, n_gm_plain);
    checks++; if (n_add_red == 0 || n_add_plain == 0) failures++;
    for (int i = 0; i < N; i++) begin checks++; if (n_mul_step[i] == 0) failures++; end
    for (int i = 0; i < 3; i++) begin checks++; if (n_g_red[i] == 0) failures++; end
    checks++; if (n_gm_red == 0 || n_gm_plain == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
