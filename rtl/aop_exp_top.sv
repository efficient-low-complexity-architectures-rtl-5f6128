// aop_exp_top: GF(2^m) all-one-polynomial arithmetic: cellular AB^2 multiplier,
// pipelined exponentiator and parallel squarer.
//
// The three units stand side by side with their own ports:
//   mul_*  : combinational c = a * b^2 (ab2_multiplier), canonical basis.
//   exp_*  : pipelined beta^N (exp_pipeline), one operation per cycle, M-1 cycles latency.
//   sq_*   : combinational squaring of an extended element (aop_square).
// Parameter M is the field degree; the default is GF(2^4).
//
// Placing the three units side by side with separate ports is this design's choice.
module aop_exp_top
  import aop_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  // AB^2 multiplier
  input  logic [M-1:0] mul_a,
  input  logic [M-1:0] mul_b,
  output logic [M-1:0] mul_c,
  // exponentiator
  input  logic         exp_in_valid,
  input  logic [M-1:0] exp_beta,
  input  logic [M-1:0] exp_n,
  output logic         exp_out_valid,
  output logic [M-1:0] exp_result,
  // squarer
  input  logic [M:0]   sq_a,
  output logic [M:0]   sq_c
);

  ab2_multiplier #(.M(M)) u_mul (
    .a (mul_a),
    .b (mul_b),
    .c (mul_c)
  );

  exp_pipeline #(.M(M)) u_exp (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (exp_in_valid),
    .beta      (exp_beta),
    .n         (exp_n),
    .out_valid (exp_out_valid),
    .result    (exp_result)
  );

  aop_square #(.M(M)) u_sq (
    .a (sq_a),
    .c (sq_c)
  );

endmodule
