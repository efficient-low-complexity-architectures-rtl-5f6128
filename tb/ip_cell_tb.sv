// ip_cell_tb: exhaustive check of the inner-product cell (all 16 input combinations).
module ip_cell_tb;
  logic a_in, b_in, c_in, s_in, a_out, b_out, c_out, s_out;
  int checks = 0, failures = 0;

  ip_cell dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {a_in, b_in, c_in, s_in} = 4'(v);
      #1;
      checks++;
      if (s_out !== (a_in && b_in) || c_out !== (c_in != s_in) ||
          a_out !== a_in || b_out !== b_in) begin
        failures++;
        $display("FAIL v=%0d a=%b b=%b c=%b s=%b", v, a_out, b_out, c_out, s_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
