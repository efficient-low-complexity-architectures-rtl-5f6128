// exp_stage: one stage of the exponentiation pipeline, F_out = E * F_in^2.
//
// The exponent bit of this stage selects E = beta or 1 (elem_mux); the cellular
// multiplication unit forms E * F^2 modulo x^(m+1)+1 with F on its squared (B) input and
// E on its A input; the product is latched in m+1 D flip-flops. The base element beta is
// latched alongside it so that the next stage's selector receives the beta that belongs to
// the same operation. The partial result stays in extended form; it is reduced modulo
// p(x) only once, after the last stage.
//
// Timing: combinational from inputs to the flip-flops, one clock cycle of latency.
// out_valid follows in_valid by one cycle and is cleared by the synchronous active-low
// reset; the data flops are not reset and are meaningful only while out_valid is 1.
//
// The stage computation and the m+1-bit latch follow the published pipeline; carrying
// beta in a register, the valid bit and the reset are this design's additions.
module exp_stage
  import aop_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [M:0] f_in,      // partial result F, extended
  input  logic [M:0] beta_in,   // base element, extended
  input  logic       n_bit,     // exponent bit of this stage
  output logic       out_valid,
  output logic [M:0] f_out,     // E * F^2, extended
  output logic [M:0] beta_out   // beta, one cycle later
);

  logic [M:0] e;
  logic [M:0] prod;

  elem_mux #(.M(M)) u_mux (
    .sel  (n_bit),
    .beta (beta_in),
    .e    (e)
  );

  mult_unit #(.M(M)) u_mult (
    .a (e),
    .b (f_in),
    .c (prod)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    f_out    <= prod;
    beta_out <= beta_in;
  end

endmodule
