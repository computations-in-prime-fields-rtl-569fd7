// gf_pkg: constants and elaboration-time helper functions shared by the
// prime-field arithmetic blocks.
//
// The blocks rest on the field isomorphism Z_p ~ Z[i]/<a+bi>, with
// p = a^2 + b^2 a prime that is 1 mod 4. The map phi(c+di) = c + k*d mod p,
// with k = -b^{-1} a mod p, sends a Gaussian integer to its residue in Z_p.
// k satisfies k^2 = -1 mod p, so k plays the role of i. The functions below
// compute k and do modular arithmetic on constants. They run only while
// parameters are being evaluated; they produce no hardware of their own.
package gf_pkg;

  // Non-negative residue of v modulo m (m > 0).
  function automatic longint mod_pos(longint v, longint m);
    longint r;
    r = v % m;
    if (r < 0) r += m;
    return r;
  endfunction

  // Multiplicative inverse of x modulo m by the extended Euclidean algorithm.
  // Returns 0 when x and m are not coprime.
  function automatic longint mod_inv(longint x, longint m);
    longint r0, r1, s0, s1, q, t;
    r0 = m; r1 = mod_pos(x, m);
    s0 = 0; s1 = 1;
    while (r1 != 0) begin
      q  = r0 / r1;
      t  = r0 - q * r1; r0 = r1; r1 = t;
      t  = s0 - q * s1; s0 = s1; s1 = t;
    end
    if (r0 != 1) return 0;
    return mod_pos(s0, m);
  endfunction

  // k = -b^{-1} a mod (a^2 + b^2): the image of i under phi.
  function automatic longint gauss_k(longint a, longint b);
    longint p;
    p = a * a + b * b;
    return mod_pos(-mod_inv(b, p) * a, p);
  endfunction

endpackage
