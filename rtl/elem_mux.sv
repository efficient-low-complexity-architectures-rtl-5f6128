// elem_mux: exponent-bit selector of the exponentiation pipeline.
//
// Outputs E = beta when the exponent bit n_i is 1 and the field element 1 (x^0, i.e.
// only coefficient 0 set) when it is 0, both in extended form. Purely combinational.
//
// As in the published pipeline.
module elem_mux
  import aop_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic       sel,    // exponent bit n_i
  input  logic [M:0] beta,   // base element, extended
  output logic [M:0] e       // sel ? beta : 1
);

  localparam logic [M:0] ONE = (M + 1)'(1);

  always_comb e = sel ? beta : ONE;

endmodule
