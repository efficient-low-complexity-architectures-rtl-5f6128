// modp_unit: reduction of an extended element modulo the all-one polynomial p(x).
//
// Since x^m = 1 + x + ... + x^(m-1) modulo p(x), the top coefficient C_m folds into
// every lower one: c_i = C_i ^ C_m for 0 <= i < m, one summation cell per output bit
// (m 2-input XORs). Purely combinational, one XOR delay.
//
// The reduction rule and cell count follow the published architecture; ports in
// natural coefficient order are this design's choice.
module modp_unit
  import aop_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic [M:0]   c_ext,  // extended element, c_ext[k] = C_k
  output logic [M-1:0] c       // canonical-basis element, c[i] = c_i
);

  for (genvar i = 0; i < M; i++) begin : g_cell
    sum_cell u_sum (
      .x (c_ext[i]),
      .y (c_ext[M]),
      .z (c[i])
    );
  end

endmodule
