// exp_stage_tb: one exponentiation stage at GF(2^4). Random F, beta, exponent bit and
// valid every cycle; one cycle later F_out must be E*F^2 modulo x^5+1 (E = beta or 1),
// beta_out must be beta and out_valid must follow in_valid. Reset clears out_valid.
module exp_stage_tb;
  import gf_ref_pkg::*;
  logic clk = 1'b0;
  logic rst_n;
  logic in_valid, n_bit, out_valid;
  logic [4:0] f_in, beta_in, f_out, beta_out;
  logic [4:0] f_q, beta_q;
  logic n_q, v_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  exp_stage #(.M(4)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t e, exp;
    rst_n = 1'b0;
    in_valid = 1'b1;
    f_in = '0;
    beta_in = '0;
    n_bit = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0) begin
      failures++;
      $display("FAIL out_valid during reset");
    end
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      f_in = 5'($urandom);
      beta_in = 5'($urandom);
      n_bit = 1'($urandom);
      in_valid = 1'($urandom);
      f_q = f_in;
      beta_q = beta_in;
      n_q = n_bit;
      v_q = in_valid;
      @(posedge clk);
      #1;
      e = n_q ? vec_t'(beta_q) : vec_t'(1);
      exp = ring_mul(e, ring_mul(vec_t'(f_q), vec_t'(f_q), 4), 4);
      checks++;
      if (out_valid !== v_q || vec_t'(f_out) !== exp || beta_out !== beta_q) begin
        failures++;
        if (failures < 10)
          $display("FAIL F=%b beta=%b n=%b v=%b -> F=%b beta=%b v=%b exp=%b",
                   f_q, beta_q, n_q, v_q, f_out, beta_out, out_valid, exp[4:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
