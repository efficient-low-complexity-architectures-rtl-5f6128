// sum_cell: summation cell, a single 2-input XOR (addition in GF(2)).
//
// Used in the last row of the multiplication array, where it adds the final partial
// product into the column sum, and in the mod p(x) unit, where it adds the top
// coefficient C_m into each lower coefficient. Purely combinational.
//
// As in the published architecture.
module sum_cell (
  input  logic x,
  input  logic y,
  output logic z   // x ^ y
);

  always_comb z = x ^ y;

endmodule
