// gf_ref_pkg: reference arithmetic for the testbenches, written independently of the
// cellular design. Elements are bit vectors, bit k = coefficient of x^k, m <= 31.
//   ring_mul : schoolbook product modulo x^(m+1)+1 (extended representation)
//   poly_red : reduction of a polynomial of degree <= 2m modulo p(x) = 1+x+...+x^m
//   gf_mul   : field product, schoolbook multiply then poly_red
//   gf_pow   : beta^N by N repeated multiplications (no square-and-multiply)
//   gf_pow_r2l : beta^N, least significant exponent bit first (for large m)
package gf_ref_pkg;

  typedef logic [63:0] vec_t;

  function automatic vec_t ring_mul(input vec_t a, input vec_t b, input int m);
    vec_t r = '0;
    for (int i = 0; i <= m; i++)
      for (int j = 0; j <= m; j++)
        if (a[i] && b[j]) r[(i + j) % (m + 1)] ^= 1'b1;
    return r;
  endfunction

  function automatic vec_t poly_red(input vec_t a, input int m);
    vec_t r = a;
    vec_t p = (vec_t'(1) << (m + 1)) - 1;   // all-one polynomial of degree m
    for (int k = 2 * m; k >= m; k--)
      if (r[k]) r ^= p << (k - m);
    return r;
  endfunction

  function automatic vec_t gf_mul(input vec_t a, input vec_t b, input int m);
    vec_t r = '0;
    for (int i = 0; i < m; i++)
      if (a[i]) r ^= b << i;
    return poly_red(r, m);
  endfunction

  function automatic vec_t gf_pow(input vec_t beta, input longint unsigned n, input int m);
    vec_t r = vec_t'(1);
    for (longint unsigned k = 0; k < n; k++) r = gf_mul(r, beta, m);
    return r;
  endfunction

  // beta^N by right-to-left binary exponentiation (LSB first), for large m.
  function automatic vec_t gf_pow_r2l(input vec_t beta, input longint unsigned n, input int m);
    vec_t r = vec_t'(1);
    vec_t s = beta;
    for (int k = 0; k < 64; k++) begin
      if (n[k]) r = gf_mul(r, s, m);
      s = gf_mul(s, s, m);
    end
    return r;
  endfunction

  function automatic vec_t mask(input int w);
    return (vec_t'(1) << w) - 1;
  endfunction

endpackage
