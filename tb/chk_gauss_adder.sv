// chk_gauss_adder: drives one gauss_adder instance for the modulus
// a + (a-1)i and checks it through the isomorphism with Z_p.
//
// The reference is independent of the design. k is found by search as the
// residue with a + k(a-1) = 0 mod p. phi(u+vi) = u + k*v mod p maps an
// element to Z_p. A result is correct when it lies in the positive residue
// set (Im < a-1 with Re <= 2a-2, or Im = a-1 with Re <= a-1) and
// phi(result) = phi(x) + phi(y) mod p. Operands are drawn from the
// same residue set: every pair when RAND_N = 0, otherwise RAND_N random
// pairs. From the operands, the checker counts how often each of the three
// reductions applies.
module chk_gauss_adder #(
  parameter int A      = 3,
  parameter int RAND_N = 0
) (
  output int   checks,
  output int   failures,
  output int   n_red1,
  output int   n_red2,
  output int   n_red3,
  output int   done
);
  localparam int  NRE = $clog2(2 * A - 1);
  localparam int  NIM = $clog2(A);
  localparam longint P = longint'(A) * A + longint'(A - 1) * (A - 1);

  logic [NRE-1:0] x_re, y_re, z_re;
  logic [NIM-1:0] x_im, y_im, z_im;
  longint k;

  gauss_adder #(.A(A)) dut (.x_re(x_re), .x_im(x_im), .y_re(y_re), .y_im(y_im), .z_re(z_re), .z_im(z_im));

  function automatic bit in_set(longint re, longint im);
    if (im < 0 || re < 0 || im > A - 1) return 1'b0;
    if (im < A - 1) return re <= 2 * A - 2;
    return re <= A - 1;
  endfunction

  function automatic longint phi(longint re, longint im);
    longint r;
    r = (re + k * im) % P;
    if (r < 0) r += P;
    return r;
  endfunction

  // Random member of the residue set.
  task automatic rand_elem(output longint re, output longint im);
    im = longint'($urandom % A);
    if (im < A - 1) re = longint'($urandom % (2 * A - 1));
    else            re = longint'($urandom % A);
  endtask

  task automatic try_pair(longint ar, longint ai, longint br, longint bi);
    longint sr, si;
    x_re = NRE'(ar); x_im = NIM'(ai); y_re = NRE'(br); y_im = NIM'(bi);
    #1;
    // Which reductions the published argument says apply to this sum.
    sr = ar + br; si = ai + bi;
    if (sr >= 2 * A - 1) begin n_red1++; sr = sr - (2 * A - 1); si++; end
    if (sr >= A && si >= A - 1) begin n_red2++; sr -= A; si -= A - 1; end
    if (si >= A) begin n_red3++; sr += A - 1; si -= A; end
    checks++;
    if (!in_set(longint'(z_re), longint'(z_im)) ||
        phi(longint'(z_re), longint'(z_im)) != (phi(ar, ai) + phi(br, bi)) % P) begin
      failures++;
      if (failures < 10)
        $display("FAIL gauss_adder a=%0d: (%0d+%0di)+(%0d+%0di) -> %0d+%0di", A, ar, ai, br, bi, z_re, z_im);
    end
  endtask

  initial begin
    longint ar, ai, br, bi;
    checks = 0; failures = 0; n_red1 = 0; n_red2 = 0; n_red3 = 0; done = 0;
    k = 0;
    while ((longint'(A) + k * (A - 1)) % P != 0) k++;
    if (RAND_N == 0) begin
      for (ai = 0; ai < A; ai++)
        for (ar = 0; ar <= 2 * A - 2; ar++)
          for (bi = 0; bi < A; bi++)
            for (br = 0; br <= 2 * A - 2; br++)
              if (in_set(ar, ai) && in_set(br, bi)) try_pair(ar, ai, br, bi);
    end else begin
      try_pair(2 * A - 2, A - 2, 2 * A - 2, A - 2);
      try_pair(A - 1, A - 1, A - 1, A - 1);
      for (int n = 0; n < RAND_N; n++) begin
        rand_elem(ar, ai);
        rand_elem(br, bi);
        try_pair(ar, ai, br, bi);
      end
    end
    done = 1;
  end
endmodule
