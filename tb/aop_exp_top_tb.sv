// aop_exp_top_tb: end-to-end test of the top at its default size, GF(2^4).
//   - AB^2 multiplier: all 256 operand pairs against schoolbook field multiplication.
//   - squarer: all 32 extended inputs against A*A modulo x^5+1.
//   - exponentiator: every (beta, N) pair twice, once in a back-to-back stream and once
//     with random idle cycles, each result against N repeated multiplications and with
//     its latency checked to be M-1 = 3 cycles; then a reset with operations in flight,
//     after which no result may come out.
// Mechanisms counted (each must occur at least once): each exponent bit taken as 1 and as
// 0 (beta or 1 selected in every selector), back-to-back issue, idle cycles, a full
// pipeline (M-1 operations in flight), and the reset flush.
module aop_exp_top_tb;
  import gf_ref_pkg::*;
  localparam int M = 4;

  logic clk = 1'b0;
  logic rst_n;
  logic [M-1:0] mul_a, mul_b, mul_c;
  logic exp_in_valid, exp_out_valid;
  logic [M-1:0] exp_beta, exp_n, exp_result;
  logic [M:0] sq_a, sq_c;

  int cyc = 0;
  int checks = 0, failures = 0;
  int bit_one [M], bit_zero [M];
  int n_b2b = 0, n_idle = 0, n_full = 0, n_flush = 0;
  logic flushing = 1'b0;
  logic prev_valid = 1'b0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  aop_exp_top dut (.*);

  typedef struct { int cyc; vec_t val; } exp_t;
  exp_t q[$];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin : monitor
    exp_t x;
    #2;
    if (rst_n && exp_out_valid) begin
      checks++;
      if (flushing || q.size() == 0) begin
        failures++;
        $display("FAIL unexpected exponentiation result");
      end else begin
        x = q.pop_front();
        if (vec_t'(exp_result) !== x.val || cyc - x.cyc != M - 1) begin
          failures++;
          $display("FAIL exp got=%b exp=%b latency=%0d", exp_result, x.val[M-1:0], cyc - x.cyc);
        end
      end
    end
    if (q.size() > 0 && cyc - q[0].cyc == M - 2 && q.size() == M - 1) n_full++;
  end

  task automatic issue(input logic [M-1:0] beta, input logic [M-1:0] n);
    exp_beta = beta;
    exp_n = n;
    exp_in_valid = 1'b1;
    q.push_back('{cyc, gf_pow(vec_t'(beta), longint'(n), M)});
    for (int i = 0; i < M; i++) if (n[i]) bit_one[i]++; else bit_zero[i]++;
    if (prev_valid) n_b2b++;
    prev_valid = 1'b1;
    @(posedge clk);
    #1;
    exp_in_valid = 1'b0;
  endtask

  task automatic idle();
    exp_in_valid = 1'b0;
    prev_valid = 1'b0;
    n_idle++;
    @(posedge clk);
    #1;
  endtask

  initial begin
    vec_t e;
    for (int i = 0; i < M; i++) begin
      bit_one[i] = 0;
      bit_zero[i] = 0;
    end
    rst_n = 1'b0;
    exp_in_valid = 1'b0;
    exp_beta = '0;
    exp_n = '0;
    mul_a = '0;
    mul_b = '0;
    sq_a = '0;
    repeat (4) @(posedge clk);
    #1;
    rst_n = 1'b1;

    // Combinational units.
    for (int v = 0; v < 256; v++) begin
      {mul_a, mul_b} = 8'(v);
      #1;
      e = gf_mul(vec_t'(mul_a), gf_mul(vec_t'(mul_b), vec_t'(mul_b), M), M);
      checks++;
      if (vec_t'(mul_c) !== e) begin
        failures++;
        $display("FAIL mul a=%b b=%b c=%b exp=%b", mul_a, mul_b, mul_c, e[M-1:0]);
      end
    end
    for (int v = 0; v < 32; v++) begin
      sq_a = 5'(v);
      #1;
      e = ring_mul(vec_t'(sq_a), vec_t'(sq_a), M);
      checks++;
      if (vec_t'(sq_c) !== e) begin
        failures++;
        $display("FAIL sq a=%b c=%b exp=%b", sq_a, sq_c, e[M:0]);
      end
    end

    // Exponentiator: back-to-back stream.
    @(posedge clk);
    #1;
    for (int v = 0; v < 256; v++) issue(4'(v >> 4), 4'(v));
    repeat (M + 1) idle();
    // With random idle cycles.
    for (int v = 0; v < 256; v++) begin
      if ($urandom % 3 == 0) idle();
      issue(4'(v), 4'(v >> 4));
    end
    repeat (M + 1) idle();
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
    end

    // Reset with operations in flight: they must be dropped.
    issue(4'd3, 4'd7);
    issue(4'd5, 4'd9);
    rst_n = 1'b0;
    flushing = 1'b1;
    q.delete();
    n_flush++;
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    repeat (M + 2) begin
      checks++;
      if (exp_out_valid) begin
        failures++;
        $display("FAIL result after reset");
      end
      @(posedge clk);
      #1;
    end
    flushing = 1'b0;
    issue(4'd2, 4'd11);
    repeat (M + 1) idle();
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL result after flush missing");
    end

    // Mechanism coverage.
    for (int i = 0; i < M; i++) begin
      $display("exponent bit %0d: one=%0d zero=%0d", i, bit_one[i], bit_zero[i]);
      checks++;
      if (bit_one[i] == 0 || bit_zero[i] == 0) failures++;
    end
    $display("back-to-back=%0d idle=%0d full=%0d flush=%0d", n_b2b, n_idle, n_full, n_flush);
    checks++;
    if (n_b2b == 0 || n_idle == 0 || n_full == 0 || n_flush == 0) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
