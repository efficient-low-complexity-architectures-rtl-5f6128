// sum_cell_tb: exhaustive check of the summation cell.
module sum_cell_tb;
  logic x, y, z;
  int checks = 0, failures = 0;

  sum_cell dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x, y} = 2'(v);
      #1;
      checks++;
      if (z !== (x != y)) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b", x, y, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
