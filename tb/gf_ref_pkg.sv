// Reference model of GF(3^M) arithmetic for the testbenches, written
// independently of the RTL. Elements are int arrays of coefficients,
// index i holding the coefficient of alpha^i (M <= 4). Powers of alpha are
// formed by square-and-multiply with general polynomial multiplication and
// reduction by the primitive polynomial, not by the RTL's shift recurrence.
package gf_ref_pkg;

  typedef int vec_t[4];

  // Product of two elements modulo the monic polynomial x^m + sum p[i] x^i.
  function automatic vec_t gf_mul(vec_t a, vec_t b, int m, vec_t p);
    int   prod[8];
    vec_t r;
    for (int i = 0; i < 8; i++) prod[i] = 0;
    for (int i = 0; i < m; i++)
      for (int j = 0; j < m; j++)
        prod[i+j] = (prod[i+j] + a[i] * b[j]) % 3;
    // x^d = x^(d-m) * x^m = -x^(d-m) * sum p[i] x^i
    for (int d = 2 * m - 2; d >= m; d--) begin
      int c;
      c = prod[d];
      prod[d] = 0;
      for (int i = 0; i < m; i++)
        prod[d-m+i] = (prod[d-m+i] + c * (3 - p[i])) % 3;
    end
    for (int i = 0; i < 4; i++) r[i] = (i < m) ? prod[i] : 0;
    return r;
  endfunction

  // alpha^e.
  function automatic vec_t gf_pow_alpha(int e, int m, vec_t p);
    vec_t r, b;
    r = '{1, 0, 0, 0};
    b = '{0, 0, 0, 0};
    if (m > 1) b[1] = 1;
    else b[0] = (3 - p[0]) % 3;
    while (e > 0) begin
      if (e % 2 == 1) r = gf_mul(r, b, m, p);
      b = gf_mul(b, b, m, p);
      e = e / 2;
    end
    return r;
  endfunction

  // Element number k: 0 is the zero element, k >= 1 is alpha^(k-1).
  function automatic vec_t gf_elem(int k, int m, vec_t p);
    if (k == 0) return '{0, 0, 0, 0};
    return gf_pow_alpha(k - 1, m, p);
  endfunction

  // Coefficient-wise sum modulo 3.
  function automatic vec_t gf_add(vec_t a, vec_t b);
    vec_t r;
    for (int i = 0; i < 4; i++) r[i] = (a[i] + b[i]) % 3;
    return r;
  endfunction

endpackage
