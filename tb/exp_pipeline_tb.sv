// exp_pipeline_tb: pipelined beta^N. GF(2^4): every (beta, N) pair, issued back to back
// with random idle cycles in between; GF(2^10) and GF(2^28): random operations. Results are
// compared with N repeated field multiplications (GF(2^28): least-significant-bit-first
// binary exponentiation), and each must appear exactly M-1 cycles after it was issued
// (3, 9 and 27 cycles). No result may appear unrequested.
module exp_pipeline_tb;
  import gf_ref_pkg::*;
  logic clk = 1'b0;
  logic rst_n;
  int   cyc = 0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // GF(2^4)
  logic       v4_in, v4_out;
  logic [3:0] beta4, n4, r4;
  exp_pipeline #(.M(4)) dut4 (.clk, .rst_n, .in_valid(v4_in), .beta(beta4), .n(n4),
                              .out_valid(v4_out), .result(r4));
  // GF(2^10)
  logic       v10_in, v10_out;
  logic [9:0] beta10, n10, r10;
  exp_pipeline #(.M(10)) dut10 (.clk, .rst_n, .in_valid(v10_in), .beta(beta10), .n(n10),
                                .out_valid(v10_out), .result(r10));

  // GF(2^28)
  logic        v28_in, v28_out;
  logic [27:0] beta28, n28, r28;
  exp_pipeline #(.M(28)) dut28 (.clk, .rst_n, .in_valid(v28_in), .beta(beta28), .n(n28),
                                .out_valid(v28_out), .result(r28));

  typedef struct { int cyc; vec_t val; } exp_t;
  exp_t q4[$], q10[$], q28[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Result monitors, sampled just after each clock edge.
  always @(posedge clk) begin : monitor
    exp_t x;
    #2;
    if (rst_n && v4_out) begin
      checks++;
      if (q4.size() == 0) begin
        failures++;
        $display("FAIL m=4 unexpected result");
      end else begin
        x = q4.pop_front();
        if (vec_t'(r4) !== x.val || cyc - x.cyc != 3) begin
          failures++;
          $display("FAIL m=4 got=%b exp=%b latency=%0d", r4, x.val[3:0], cyc - x.cyc);
        end
      end
    end
    if (rst_n && v10_out) begin
      checks++;
      if (q10.size() == 0) begin
        failures++;
        $display("FAIL m=10 unexpected result");
      end else begin
        x = q10.pop_front();
        if (vec_t'(r10) !== x.val || cyc - x.cyc != 9) begin
          failures++;
          $display("FAIL m=10 got=%b exp=%b latency=%0d", r10, x.val[9:0], cyc - x.cyc);
        end
      end
    end
    if (rst_n && v28_out) begin
      checks++;
      if (q28.size() == 0) begin
        failures++;
        $display("FAIL m=28 unexpected result");
      end else begin
        x = q28.pop_front();
        if (vec_t'(r28) !== x.val || cyc - x.cyc != 27) begin
          failures++;
          $display("FAIL m=28 got=%h exp=%h latency=%0d", r28, x.val[27:0], cyc - x.cyc);
        end
      end
    end
  end

  initial begin
    int k4 = 0;
    rst_n = 1'b0;
    v4_in = 1'b0;
    v10_in = 1'b0;
    v28_in = 1'b0;
    beta28 = '0;
    n28 = '0;
    beta4 = '0;
    n4 = '0;
    beta10 = '0;
    n10 = '0;
    repeat (12) @(posedge clk);
    #1;
    rst_n = 1'b1;
    while (k4 < 256 || q4.size() != 0 || q10.size() != 0 || q28.size() != 0) begin
      v4_in = 1'b0;
      v10_in = 1'b0;
      v28_in = 1'b0;
      if (k4 < 256 && ($urandom % 4 != 0)) begin
        beta4 = 4'(k4 >> 4);
        n4 = 4'(k4);
        v4_in = 1'b1;
        q4.push_back('{cyc, gf_pow(vec_t'(beta4), longint'(n4), 4)});
        k4++;
      end
      if (k4 < 256 && ($urandom % 2 == 0)) begin
        beta10 = 10'($urandom);
        n10 = 10'($urandom);
        v10_in = 1'b1;
        q10.push_back('{cyc, gf_pow(vec_t'(beta10), longint'(n10), 10)});
      end
      if (k4 < 256 && ($urandom % 2 == 0)) begin
        beta28 = 28'($urandom);
        n28 = 28'($urandom);
        v28_in = 1'b1;
        q28.push_back('{cyc, gf_pow_r2l(vec_t'(beta28), longint'(n28), 28)});
      end
      @(posedge clk);
      #1;
    end
    repeat (12) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
