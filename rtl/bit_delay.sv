// bit_delay: DEPTH-cycle delay line for one exponent bit (the D_i elements of the
// exponentiation pipeline).
//
// Bit n_i is used by the pipeline stage that is reached i cycles after the operation
// enters, so it is carried through a shift register of that many flip-flops. The flops
// are cleared by the synchronous active-low reset. DEPTH = 0 is a plain wire.
//
// The published delay elements are given as propagation delays; realising them as
// clocked shift registers, and the reset, are this design's choices.
module bit_delay #(
  parameter int unsigned DEPTH = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q    // d delayed by DEPTH clock cycles
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_shift
    logic [DEPTH-1:0] sr;
    always_ff @(posedge clk) begin
      if (!rst_n) sr <= '0;
      else        sr <= (sr << 1) | DEPTH'(d);
    end
    assign q = sr[DEPTH-1];
  end

endmodule
