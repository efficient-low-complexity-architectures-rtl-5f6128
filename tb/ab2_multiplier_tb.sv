// ab2_multiplier_tb: c = a*b^2 in GF(2^m). GF(2^4) exhaustively (256 pairs), GF(2^10)
// and GF(2^28) with random operands, against schoolbook field multiplication. Also checks the
// GF(2^4) identities a*1^2 = a and b^(2^4) = b (via four chained squarings).
module ab2_multiplier_tb;
  import gf_ref_pkg::*;
  logic [3:0] a4, b4, c4;
  logic [9:0] a10, b10, c10;
  logic [27:0] a28, b28, c28;
  int checks = 0, failures = 0;

  ab2_multiplier #(.M(4))  dut4  (.a(a4),  .b(b4),  .c(c4));
  ab2_multiplier #(.M(10)) dut10 (.a(a10), .b(b10), .c(c10));
  ab2_multiplier #(.M(28)) dut28 (.a(a28), .b(b28), .c(c28));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t exp;
    for (int v = 0; v < 256; v++) begin
      {a4, b4} = 8'(v);
      #1;
      exp = gf_mul(vec_t'(a4), gf_mul(vec_t'(b4), vec_t'(b4), 4), 4);
      checks++;
      if (vec_t'(c4) !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL m=4 a=%b b=%b c=%b exp=%b", a4, b4, c4, exp[3:0]);
      end
      if (b4 == 4'd1) begin
        checks++;
        if (c4 !== a4) begin
          failures++;
          $display("FAIL a*1 a=%b c=%b", a4, c4);
        end
      end
    end
    // b^16 = b in GF(2^4): square four times using a = 1.
    for (int v = 0; v < 16; v++) begin
      logic [3:0] x;
      x = 4'(v);
      for (int k = 0; k < 4; k++) begin
        a4 = 4'd1;
        b4 = x;
        #1;
        x = c4;
      end
      checks++;
      if (x !== 4'(v)) begin
        failures++;
        $display("FAIL b^16 b=%0d got=%0d", v, x);
      end
    end
    for (int t = 0; t < 500; t++) begin
      a10 = 10'($urandom);
      b10 = 10'($urandom);
      a28 = 28'($urandom);
      b28 = 28'($urandom);
      #1;
      exp = gf_mul(vec_t'(a28), gf_mul(vec_t'(b28), vec_t'(b28), 28), 28);
      checks++;
      if (vec_t'(c28) !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL m=28 a=%h b=%h c=%h", a28, b28, c28);
      end
      exp = gf_mul(vec_t'(a10), gf_mul(vec_t'(b10), vec_t'(b10), 10), 10);
      checks++;
      if (vec_t'(c10) !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL m=10 a=%b b=%b c=%b", a10, b10, c10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
