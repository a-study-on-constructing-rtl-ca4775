// gf_ref_pkg: reference arithmetic for the GF(P^m) testbenches.
//
// Elements are held as plain integer arrays (index = power of alpha, up to
// 16 digits; unreduced products up to 32). The product is computed by
// schoolbook multiplication and reduced by polynomial long division, which is
// a different method from the hardware's (the hardware accumulates codes of
// alpha^w), so the two can check each other.
package gf_ref_pkg;

  typedef int unsigned dig_t [16];
  typedef int unsigned wide_t [32];

  function automatic dig_t ref_add(input dig_t a, input dig_t b, input int unsigned p,
                                   input int unsigned m);
    dig_t s;
    foreach (s[i]) s[i] = 0;
    for (int unsigned i = 0; i < m; i++) s[i] = (a[i] + b[i]) % p;
    return s;
  endfunction

  // Unreduced product digits R_0 .. R_(2m-2).
  function automatic wide_t ref_polymul(input dig_t a, input dig_t b, input int unsigned p,
                                        input int unsigned m);
    wide_t r;
    foreach (r[i]) r[i] = 0;
    for (int unsigned i = 0; i < m; i++)
      for (int unsigned j = 0; j < m; j++)
        r[i+j] = (r[i+j] + a[i] * b[j]) % p;
    return r;
  endfunction

  // Remainder of r (degree <= 2m-2) divided by the monic
  // F(X) = X^m + f[m-1] X^(m-1) + ... + f[0].
  function automatic dig_t ref_reduce(input wide_t r, input dig_t f, input int unsigned p,
                                      input int unsigned m);
    wide_t w;
    dig_t  q;
    int unsigned c;
    w = r;
    for (int d = 2 * m - 2; d >= int'(m); d--) begin
      c = w[d];
      w[d] = 0;
      for (int unsigned i = 0; i < m; i++)
        w[d-m+i] = (w[d-m+i] + (p - (c * f[i]) % p)) % p;
    end
    foreach (q[i]) q[i] = 0;
    for (int unsigned i = 0; i < m; i++) q[i] = w[i];
    return q;
  endfunction

  function automatic dig_t ref_mul(input dig_t a, input dig_t b, input dig_t f,
                                   input int unsigned p, input int unsigned m);
    return ref_reduce(ref_polymul(a, b, p, m), f, p, m);
  endfunction

  // The fixed polynomial of the combinational method: every f_i = P-1.
  function automatic dig_t comb_poly(input int unsigned p);
    dig_t f;
    foreach (f[i]) f[i] = p - 1;
    return f;
  endfunction

  function automatic dig_t rand_elem(input int unsigned p, input int unsigned m);
    dig_t e;
    foreach (e[i]) e[i] = 0;
    for (int unsigned i = 0; i < m; i++) e[i] = $urandom_range(0, p - 1);
    return e;
  endfunction

endpackage
