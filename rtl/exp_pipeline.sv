// exp_pipeline: pipelined exponentiation S = beta^N in GF(2^m), AOP basis.
//
// With N = n_0 + 2 n_1 + ... + 2^(m-1) n_(m-1), beta^N is evaluated from the top bit down
// as F = (n_(m-1) ? beta : 1), then F = E * F^2 with E = (n_i ? beta : 1) for
// i = m-2 .. 0, then a single reduction modulo p(x). Each step maps onto one AB^2
// multiplication, so the pipeline is m-1 exp_stage instances in a chain followed by a
// mod p unit. Stage k (k = 0 .. m-2) uses bit n_(m-2-k) and is reached k cycles after the
// operation enters, so that bit goes through a k-cycle bit_delay; n_(m-1) and n_(m-2) are
// used at once.
//
// Timing: a new operation can enter every cycle (in_valid); its result appears on
// result with out_valid exactly M-1 cycles later. The mod p unit sits after the last
// pipeline register, so result is combinational from that register. Requires M >= 2.
//
// The algorithm, the number of stages (m-1) and the latency of m-1 cycles follow the
// published design, as does reducing modulo p(x) only once at the end; the valid
// signalling, the reset and the choice of n_(m-1), n_(m-2) for the first two selectors
// (the algorithm's order) are this design's.
module exp_pipeline
  import aop_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [M-1:0] beta,      // base element, canonical basis
  input  logic [M-1:0] n,         // exponent N, n[i] = n_i
  output logic         out_valid,
  output logic [M-1:0] result     // beta^N, canonical basis
);

  if (!aop_irreducible(M)) begin : g_bad_m
    $error("M = %0d: 1 + x + ... + x^M is not irreducible, no field GF(2^M) over an AOP", M);
  end

  localparam int unsigned NST = M - 1;   // number of pipeline stages

  logic [M:0] f_r    [0:NST];
  logic [M:0] beta_r [0:NST];
  logic       v_r    [0:NST];
  logic       nsel   [0:NST-1];

  assign beta_r[0] = {1'b0, beta};
  assign v_r[0]    = in_valid;

  // Initial value of F from the top exponent bit.
  elem_mux #(.M(M)) u_mux_top (
    .sel  (n[M-1]),
    .beta (beta_r[0]),
    .e    (f_r[0])
  );

  for (genvar k = 0; k < NST; k++) begin : g_stage
    if (k == 0) begin : g_now
      assign nsel[k] = n[M-2];
    end else begin : g_dly
      bit_delay #(.DEPTH(k)) u_dly (
        .clk   (clk),
        .rst_n (rst_n),
        .d     (n[M-2-k]),
        .q     (nsel[k])
      );
    end

    exp_stage #(.M(M)) u_stage (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (v_r[k]),
      .f_in      (f_r[k]),
      .beta_in   (beta_r[k]),
      .n_bit     (nsel[k]),
      .out_valid (v_r[k+1]),
      .f_out     (f_r[k+1]),
      .beta_out  (beta_r[k+1])
    );
  end

  modp_unit #(.M(M)) u_modp (
    .c_ext (f_r[NST]),
    .c     (result)
  );

  assign out_valid = v_r[NST];

  logic unused_ok;
  assign unused_ok = ^beta_r[NST];

endmodule
