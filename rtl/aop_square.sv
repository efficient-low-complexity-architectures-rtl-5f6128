// aop_square: parallel squarer of an extended element modulo x^(m+1)+1.
//
// Squaring is linear in GF(2) and maps x^k to x^(2k mod (m+1)), so the squarer is a fixed
// permutation of the coefficients without any gates: C_i = A_(i/2) for even i and
// C_i = A_((i+m+1)/2) for odd i. For m = 4: C = (A0, A3, A1, A4, A2).
// Purely combinational wiring.
//
// The permutation is the published one.
module aop_square
  import aop_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic [M:0] a,   // extended element A
  output logic [M:0] c    // A^2, extended
);

  for (genvar i = 0; i <= M; i++) begin : g_perm
    localparam int unsigned SRC = (i % 2 == 0) ? i / 2 : (i + M + 1) / 2;
    assign c[i] = a[SRC];
  end

endmodule
