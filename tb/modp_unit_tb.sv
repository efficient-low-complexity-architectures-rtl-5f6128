// modp_unit_tb: reduction modulo the all-one polynomial. GF(2^4) exhaustively (32
// extended inputs) and GF(2^10) with random inputs, against generic polynomial reduction.
module modp_unit_tb;
  import gf_ref_pkg::*;
  logic [4:0]  c4_ext;
  logic [3:0]  c4;
  logic [10:0] c10_ext;
  logic [9:0]  c10;
  int checks = 0, failures = 0;

  modp_unit #(.M(4))  dut4  (.c_ext(c4_ext),  .c(c4));
  modp_unit #(.M(10)) dut10 (.c_ext(c10_ext), .c(c10));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t exp;
    for (int v = 0; v < 32; v++) begin
      c4_ext = 5'(v);
      #1;
      exp = poly_red(vec_t'(c4_ext), 4);
      checks++;
      if (vec_t'(c4) !== exp) begin
        failures++;
        $display("FAIL m=4 C=%b c=%b exp=%b", c4_ext, c4, exp[3:0]);
      end
    end
    for (int t = 0; t < 500; t++) begin
      c10_ext = 11'($urandom);
      #1;
      exp = poly_red(vec_t'(c10_ext), 10);
      checks++;
      if (vec_t'(c10) !== exp) begin
        failures++;
        $display("FAIL m=10 C=%b c=%b", c10_ext, c10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
