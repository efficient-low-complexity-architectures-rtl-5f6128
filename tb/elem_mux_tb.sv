// elem_mux_tb: E = n ? beta : 1 for all GF(2^4) extended betas and both selector values.
module elem_mux_tb;
  logic       sel;
  logic [4:0] beta, e;
  int checks = 0, failures = 0;

  elem_mux #(.M(4)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {sel, beta} = 6'(v);
      #1;
      checks++;
      if (e !== (sel ? beta : 5'b00001)) begin
        failures++;
        $display("FAIL sel=%b beta=%b e=%b", sel, beta, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
