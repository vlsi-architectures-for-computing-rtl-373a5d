// tb_gf_ref_pkg -- reference GF(2^m) arithmetic for the testbenches.
//
// Works in the polynomial basis, independently of the normal-basis tables
// used by the design: an element [b0..b_{m-1}] of the normal basis stands
// for sum b_i * x^(2^i) mod p(x).  Products are formed in the polynomial
// basis and converted back by exhaustive search over all 2^m normal-basis
// vectors, so these functions are only meant for small m (m <= 10).
package tb_gf_ref_pkg;

  // a * b mod p, degree m, polynomial basis.
  function automatic int unsigned ref_pmul(int unsigned a, int unsigned b,
                                           longint unsigned p, int unsigned m);
    longint unsigned r;
    r = 0;
    for (int unsigned i = 0; i < m; i++)
      if (((b >> i) & 1) != 0) r = r ^ (longint'(a) << i);
    for (int i = 2 * int'(m) - 2; i >= int'(m); i--)
      if (((r >> i) & 1) != 0) r = r ^ (p << (i - int'(m)));
    return int'(r);
  endfunction

  // Normal-basis vector to polynomial-basis value.
  function automatic int unsigned ref_nb_to_poly(int unsigned v, longint unsigned p,
                                                 int unsigned m);
    int unsigned x, s;
    x = 2;   // alpha = x
    s = 0;
    for (int unsigned i = 0; i < m; i++) begin
      if (((v >> i) & 1) != 0) s = s ^ x;
      x = ref_pmul(x, x, p, m);
    end
    return s;
  endfunction

  // Polynomial-basis value to normal-basis vector (exhaustive search).
  function automatic int unsigned ref_poly_to_nb(int unsigned y, longint unsigned p,
                                                 int unsigned m);
    for (int unsigned v = 0; v < (1 << m); v++)
      if (ref_nb_to_poly(v, p, m) == y) return v;
    return 32'hFFFF_FFFF;
  endfunction

  // beta * gamma, normal basis in and out.
  function automatic int unsigned ref_nb_mul(int unsigned b, int unsigned c,
                                             longint unsigned p, int unsigned m);
    return ref_poly_to_nb(ref_pmul(ref_nb_to_poly(b, p, m), ref_nb_to_poly(c, p, m), p, m),
                          p, m);
  endfunction

  // alpha^-1 (0 for alpha = 0), normal basis in and out, by search.
  function automatic int unsigned ref_nb_inv(int unsigned a, longint unsigned p,
                                             int unsigned m);
    int unsigned ya;
    ya = ref_nb_to_poly(a, p, m);
    if (ya == 0) return 0;
    for (int unsigned y = 1; y < (1 << m); y++)
      if (ref_pmul(ya, y, p, m) == 1) return ref_poly_to_nb(y, p, m);
    return 32'hFFFF_FFFF;
  endfunction

endpackage
