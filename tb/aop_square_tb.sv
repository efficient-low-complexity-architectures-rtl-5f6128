// aop_square_tb: A^2 modulo x^(m+1)+1. GF(2^4) exhaustively (32 extended inputs) and
// GF(2^10) with random inputs, against a schoolbook ring product A*A.
module aop_square_tb;
  import gf_ref_pkg::*;
  logic [4:0]  a4, c4;
  logic [10:0] a10, c10;
  int checks = 0, failures = 0;

  aop_square #(.M(4))  dut4  (.a(a4),  .c(c4));
  aop_square #(.M(10)) dut10 (.a(a10), .c(c10));

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
      a4 = 5'(v);
      #1;
      exp = ring_mul(vec_t'(a4), vec_t'(a4), 4);
      checks++;
      if (vec_t'(c4) !== exp) begin
        failures++;
        $display("FAIL m=4 A=%b C=%b exp=%b", a4, c4, exp[4:0]);
      end
    end
    for (int t = 0; t < 300; t++) begin
      a10 = 11'($urandom);
      #1;
      exp = ring_mul(vec_t'(a10), vec_t'(a10), 10);
      checks++;
      if (vec_t'(c10) !== exp) begin
        failures++;
        $display("FAIL m=10 A=%b C=%b", a10, c10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
