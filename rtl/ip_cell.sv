// ip_cell: inner-product cell (i,j) of the cellular AB^2 multiplication array.
//
// The cell holds one 2-input AND and one 2-input XOR. The AND forms this row's partial
// product S_out = A & B of the operand bits routed to column j; the XOR adds the partial
// product produced by the row above (s_in) into the running column sum (c_in), so the
// sum lags the products by one row. The A and B bits are passed on unchanged; the
// array, not the cell, routes them to the shifted columns of the next row (B one column
// to the right, A two columns to the left, both cyclically). Purely combinational.
//
// The gate content of the cell follows the published architecture; treating the
// partial-product "storage" as a wire (no clock) is this design's reading.
module ip_cell (
  input  logic a_in,   // A coefficient arriving at this column
  input  logic b_in,   // B coefficient arriving at this column
  input  logic c_in,   // running column sum from the row above
  input  logic s_in,   // partial product from the row above
  output logic a_out,  // A passed to the next row
  output logic b_out,  // B passed to the next row
  output logic c_out,  // c_in ^ s_in
  output logic s_out   // a_in & b_in
);

  always_comb begin
    s_out = a_in & b_in;
    c_out = c_in ^ s_in;
    a_out = a_in;
    b_out = b_in;
  end

endmodule
