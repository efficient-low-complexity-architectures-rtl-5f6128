// bit_delay_tb: delay lines of 1 and 3 cycles fed with a random bit stream; checks the
// delay against a history of the input and that reset clears the line.
module bit_delay_tb;
  logic clk = 1'b0;
  logic rst_n;
  logic d, q1, q3;
  logic [15:0] hist;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bit_delay #(.DEPTH(1)) dut1 (.clk, .rst_n, .d, .q(q1));
  bit_delay #(.DEPTH(3)) dut3 (.clk, .rst_n, .d, .q(q3));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    d = 1'b1;
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (q1 !== 1'b0 || q3 !== 1'b0) begin
      failures++;
      $display("FAIL reset q1=%b q3=%b", q1, q3);
    end
    rst_n = 1'b1;
    hist = '0;
    for (int t = 0; t < 500; t++) begin
      d = 1'($urandom);
      @(posedge clk);
      hist = {hist[14:0], d};
      #1;
      if (t >= 3) begin
        checks += 2;
        if (q1 !== hist[0]) begin
          failures++;
          $display("FAIL t=%0d q1=%b exp=%b", t, q1, hist[0]);
        end
        if (q3 !== hist[2]) begin
          failures++;
          $display("FAIL t=%0d q3=%b exp=%b", t, q3, hist[2]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
