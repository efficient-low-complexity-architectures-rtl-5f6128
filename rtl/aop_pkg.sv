// aop_pkg: constants and index helpers shared by the GF(2^m) all-one-polynomial (AOP)
// arithmetic blocks.
//
// Elements are handled in the "extended" representation A_0 + A_1 x + ... + A_m x^m,
// i.e. modulo x^(m+1)+1, where m+1 is prime and p(x) = 1 + x + ... + x^m is irreducible.
// In that ring a multiplication by x^k is a cyclic rotation of the m+1 coefficients,
// which is what the cellular multiplier exploits. The helpers below give the fixed index
// mappings that the array wiring uses; they are evaluated at elaboration time only.
package aop_pkg;

  // Field degree of the reference configuration, GF(2^4) with p(x) = 1+x+x^2+x^3+x^4.
  localparam int unsigned M_DEFAULT = 4;

  // <k> : k modulo m+1, for any (possibly negative) integer k.
  function automatic int unsigned mod_m1(input int k, input int unsigned m);
    int r;
    r = k % int'(m + 1);
    if (r < 0) r += int'(m + 1);
    return int'(r);
  endfunction

  // Column j of the multiplication array accumulates the terms of weight x^(3j), so it
  // delivers coefficient C_<3j> of the product.
  function automatic int unsigned col_coeff(input int unsigned j, input int unsigned m);
    return mod_m1(3 * int'(j), m);
  endfunction

  // 1 + x + ... + x^m is irreducible over GF(2) exactly when m+1 is prime and 2 has
  // multiplicative order m modulo m+1. Used for elaboration-time parameter checks.
  function automatic bit aop_irreducible(input int unsigned m);
    int unsigned q, x;
    q = m + 1;
    if (m < 2) return 1'b0;
    for (int unsigned d = 2; d * d <= q; d++)
      if (q % d == 0) return 1'b0;
    x = 1;
    for (int unsigned k = 1; k < m; k++) begin
      x = (2 * x) % q;
      if (x == 1) return 1'b0;
    end
    return 1'b1;
  endfunction

endpackage
