// amns_ref_pkg: reference arithmetic for the AMNS testbenches.
//
// Plain big-integer polynomial arithmetic, written directly from the
// definitions and independent of the DSP-section datapath:
//   polymul      : A*B mod (X^N - lambda)
//   mask_pow2    : each coefficient mod 2^w (non-negative)
//   redint       : S = (C + (Q*M mod E)) / phi with C = A*B mod E and
//                  Q = C*M' mod (E, phi)
//   newton_inv   : M^-1 mod (E, 2^w) by Newton iteration Y <- Y*(2 - M*Y)
//   eval_mod     : A(gamma) mod p
package amns_ref_pkg;

  typedef logic signed [1023:0] big_t;
  typedef big_t poly_t [];

  function automatic poly_t polymul(poly_t a, poly_t b, int lambda);
    int    n = a.size();
    poly_t c = new[n];
    for (int j = 0; j < n; j++) c[j] = '0;
    for (int i = 0; i < n; i++)
      for (int k = 0; k < n; k++)
        if (i + k < n) c[i+k]   += a[i] * b[k];
        else           c[i+k-n] += big_t'(lambda) * a[i] * b[k];
    return c;
  endfunction

  function automatic big_t mask_w(big_t x, int w);
    big_t m = (big_t'(1) <<< w) - 1;
    return x & m;
  endfunction

  function automatic poly_t mask_pow2(poly_t a, int w);
    poly_t c = new[a.size()];
    foreach (a[i]) c[i] = mask_w(a[i], w);
    return c;
  endfunction

  function automatic poly_t padd(poly_t a, poly_t b);
    poly_t c = new[a.size()];
    foreach (a[i]) c[i] = a[i] + b[i];
    return c;
  endfunction

  // Returns S; exact reports whether C + Q*M mod E was divisible by 2^phi_w.
  function automatic poly_t redint(poly_t a, poly_t b, poly_t m, poly_t mp,
                                   int lambda, int phi_w, output bit exact);
    poly_t c = polymul(a, b, lambda);
    poly_t q = mask_pow2(polymul(mask_pow2(c, phi_w), mask_pow2(mp, phi_w), lambda), phi_w);
    poly_t t = polymul(q, m, lambda);
    poly_t u = padd(c, t);
    poly_t s = new[a.size()];
    exact = 1'b1;
    foreach (u[i]) begin
      if (mask_w(u[i], phi_w) != 0) exact = 1'b0;
      s[i] = u[i] >>> phi_w;
    end
    return s;
  endfunction

  function automatic poly_t newton_inv(poly_t m, poly_t y0, int lambda, int w);
    poly_t y = y0;
    for (int it = 0; it < 12; it++) begin
      poly_t my = polymul(m, y, lambda);
      foreach (my[i]) my[i] = -my[i];
      my[0] += 2;
      y = mask_pow2(polymul(y, my, lambda), w);
    end
    return y;
  endfunction

  function automatic big_t eval_mod(poly_t a, big_t gamma, big_t p);
    big_t acc = '0;
    for (int i = a.size() - 1; i >= 0; i--) acc = ((acc * gamma + a[i]) % p + p) % p;
    return acc;
  endfunction

endpackage
