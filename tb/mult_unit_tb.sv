// mult_unit_tb: C = A*B^2 modulo x^(m+1)+1 on extended elements. GF(2^4) exhaustively
// (all 1024 pairs of 5-bit extended operands, including A_4 = 1 or B_4 = 1), GF(2^10)
// and GF(2^12) with random operands, against a schoolbook ring product. For GF(2^4) the
// running column sums of every row are also checked against the partial sums C^(i).
module mult_unit_tb;
  import gf_ref_pkg::*;
  logic [4:0]  a4, b4, c4;
  logic [10:0] a10, b10, c10;
  logic [12:0] a12, b12, c12;
  int checks = 0, failures = 0;

  mult_unit #(.M(4))  dut4  (.a(a4),  .b(b4),  .c(c4));
  mult_unit #(.M(10)) dut10 (.a(a10), .b(b10), .c(c10));
  mult_unit #(.M(12)) dut12 (.a(a12), .b(b12), .c(c12));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t exp;
    for (int v = 0; v < 1024; v++) begin
      {a4, b4} = 10'(v);
      #1;
      // Row by row, as in the step-by-step accumulation C^(i) = C^(i-1) + S^(i-1):
      // the column sum leaving row i must be the XOR of the products of rows 0 .. i-1.
      for (int i = 0; i <= 4; i++) begin
        for (int j = 0; j <= 4; j++) begin
          logic acc;
          acc = 1'b0;
          for (int k = 0; k < i; k++) acc ^= a4[(j + 2 * k) % 5] & b4[(j - k + 5) % 5];
          checks++;
          if (dut4.c_r[i+1][j] !== acc) begin
            failures++;
            if (failures < 10) $display("FAIL row %0d col %0d A=%b B=%b", i, j, a4, b4);
          end
        end
      end
      exp = ring_mul(vec_t'(a4), ring_mul(vec_t'(b4), vec_t'(b4), 4), 4);
      checks++;
      if (vec_t'(c4) !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL m=4 A=%b B=%b C=%b exp=%b", a4, b4, c4, exp[4:0]);
      end
    end
    for (int t = 0; t < 300; t++) begin
      a10 = 11'($urandom);
      b10 = 11'($urandom);
      a12 = 13'($urandom);
      b12 = 13'($urandom);
      #1;
      exp = ring_mul(vec_t'(a10), ring_mul(vec_t'(b10), vec_t'(b10), 10), 10);
      checks++;
      if (vec_t'(c10) !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL m=10 A=%b B=%b C=%b", a10, b10, c10);
      end
      exp = ring_mul(vec_t'(a12), ring_mul(vec_t'(b12), vec_t'(b12), 12), 12);
      checks++;
      if (vec_t'(c12) !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL m=12 A=%b B=%b C=%b", a12, b12, c12);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
