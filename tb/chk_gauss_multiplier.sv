// chk_gauss_multiplier: drives one gauss_multiplier instance for the modulus
// a + bi and checks it against Z_p arithmetic.
//
// The reference is independent of the design. k is found by search as the
// residue with a + k*b = 0 mod p. For every W-bit element the checker finds
// the least norm of its class by brute force, and the operands are the
// elements that reach it. A result must have phi(result) = phi(x)*phi(y)
// mod p and a norm equal to the least norm of its class. n_reduced counts
// products whose unreduced value (ce - df) + (cf + de)i is not itself a
// least-norm element, i.e. products that needed a reduction.
module chk_gauss_multiplier #(
  parameter int A = 3,
  parameter int B = 2,
  parameter int W = 3
) (
  output int   checks,
  output int   failures,
  output int   n_reduced,
  output int   done
);
  localparam int P  = A * A + B * B;
  localparam int LO = -(2 ** (W - 1));
  localparam int HI = (2 ** (W - 1)) - 1;

  logic signed [W-1:0] x_re, x_im, y_re, y_im, z_re, z_im;
  int k;
  int min_norm [P];

  gauss_multiplier #(.A(A), .B(B), .W(W)) dut (
    .x_re(x_re), .x_im(x_im), .y_re(y_re), .y_im(y_im), .z_re(z_re), .z_im(z_im));

  function automatic int phi(int re, int im);
    int r;
    r = (re + k * im) % P;
    if (r < 0) r += P;
    return r;
  endfunction

  function automatic bit is_rep(int re, int im);
    return re * re + im * im == min_norm[phi(re, im)];
  endfunction

  initial begin
    int ur, ui, zr, zi;
    checks = 0; failures = 0; n_reduced = 0; done = 0;
    k = 0;
    while ((A + k * B) % P != 0) k++;
    for (int r = 0; r < P; r++) min_norm[r] = 1 << 30;
    for (int re = LO; re <= HI; re++)
      for (int im = LO; im <= HI; im++)
        if (re * re + im * im < min_norm[phi(re, im)]) min_norm[phi(re, im)] = re * re + im * im;
    for (int c = LO; c <= HI; c++)
      for (int d = LO; d <= HI; d++)
        for (int e = LO; e <= HI; e++)
          for (int f = LO; f <= HI; f++)
            if (is_rep(c, d) && is_rep(e, f)) begin
              x_re = W'(c); x_im = W'(d); y_re = W'(e); y_im = W'(f);
              #1;
              ur = c * e - d * f;
              ui = c * f + d * e;
              if (ur < LO || ur > HI || ui < LO || ui > HI || !is_rep(ur, ui)) n_reduced++;
              zr = int'(z_re); zi = int'(z_im);
              checks++;
              if (phi(zr, zi) != (phi(c, d) * phi(e, f)) % P || !is_rep(zr, zi)) begin
                failures++;
                if (failures < 10)
                  $display("FAIL gauss_multiplier p=%0d: (%0d,%0di)(%0d,%0di) -> %0d,%0di", P, c, d, e, f, zr, zi);
              end
            end
    done = 1;
  end
endmodule
