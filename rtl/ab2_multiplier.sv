// ab2_multiplier: bit-parallel cellular multiplier c = a * b^2 in GF(2^m), AOP basis.
//
// The canonical-basis operands are extended with a zero top coefficient (A_m = B_m = 0),
// multiplied modulo x^(m+1)+1 by the cellular multiplication unit, and the product is
// reduced modulo p(x) = 1 + x + ... + x^m by the mod p unit. No precomputed table is
// needed. Purely combinational: one AND delay plus m+2 XOR delays.
//
// The structure follows the published architecture; building it without any register
// is this design's reading, as only gate delays are given for it.
module ab2_multiplier
  import aop_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic [M-1:0] a,   // a[i] = a_i
  input  logic [M-1:0] b,   // b[i] = b_i
  output logic [M-1:0] c    // c = a * b^2
);

  if (!aop_irreducible(M)) begin : g_bad_m
    $error("M = %0d: 1 + x + ... + x^M is not irreducible, no field GF(2^M) over an AOP", M);
  end

  logic [M:0] c_ext;

  mult_unit #(.M(M)) u_mult (
    .a ({1'b0, a}),
    .b ({1'b0, b}),
    .c (c_ext)
  );

  modp_unit #(.M(M)) u_modp (
    .c_ext (c_ext),
    .c     (c)
  );

endmodule
