// mult_unit: cellular multiplication unit, C = A * B^2 mod (x^(m+1) + 1).
//
// A and B are extended elements (m+1 coefficients). The array has m+1 rows of m+1
// inner-product cells and one final row of m+1 summation cells. Row i sees, in column j,
// A_<j+2i> (A rotated left by 2i) and B_<j-i> (B^2 rotated right by i, expressed on the
// coefficients of B), so its ANDs form the i-th inner product S^(i) of the circular
// convolution; the XOR chain down each column adds S^(0) .. S^(m). Every term in column
// j has weight x^(3j) mod (x^(m+1)+1), so column j yields coefficient C_<3j>; the output
// wiring puts the columns back into natural coefficient order (for m = 4 the columns are
// C0, C3, C1, C4, C2). Between rows, B moves one column right and A two columns left,
// cyclically. The C and S inputs of the first row are tied to 0 (C^(0) = 0).
//
// Purely combinational: one AND delay plus m+1 XOR delays from input to output.
// Parameter M: field degree m; 1+x+..+x^m must be irreducible (checked where a field
// is formed, see aop_irreducible) for the result to be a field product; the ring product
// itself is exact for any M.
//
// Array geometry, cell routing and the column-to-coefficient order follow the published
// architecture; tying the top-row C and S inputs to zero and reordering the outputs into
// natural order are this design's choices.
module mult_unit
  import aop_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic [M:0] a,   // extended element A, a[k] = A_k
  input  logic [M:0] b,   // extended element B, b[k] = B_k
  output logic [M:0] c    // extended element C = A*B^2, c[k] = C_k
);

  // Signals entering row r (r = 0 .. M+1); row M+1 is the summation row.
  logic [M:0] a_r [0:M+1];
  logic [M:0] b_r [0:M+1];
  logic [M:0] c_r [0:M+1];
  logic [M:0] s_r [0:M+1];
  logic [M:0] col;        // column outputs of the summation row

  assign a_r[0] = a;
  assign b_r[0] = b;
  assign c_r[0] = '0;
  assign s_r[0] = '0;

  for (genvar i = 0; i <= M; i++) begin : g_row
    for (genvar j = 0; j <= M; j++) begin : g_col
      localparam int unsigned JB = mod_m1(j + 1, M);   // B goes one column right
      localparam int unsigned JA = mod_m1(j - 2, M);   // A goes two columns left
      ip_cell u_cell (
        .a_in  (a_r[i][j]),
        .b_in  (b_r[i][j]),
        .c_in  (c_r[i][j]),
        .s_in  (s_r[i][j]),
        .a_out (a_r[i+1][JA]),
        .b_out (b_r[i+1][JB]),
        .c_out (c_r[i+1][j]),
        .s_out (s_r[i+1][j])
      );
    end
  end

  for (genvar j = 0; j <= M; j++) begin : g_sum
    sum_cell u_sum (
      .x (c_r[M+1][j]),
      .y (s_r[M+1][j]),
      .z (col[j])
    );
    assign c[col_coeff(j, M)] = col[j];
  end

  // The operands leaving the last row are not used: after m+1 rotations by two (A) and
  // by one (B) they are the inputs again.
  logic unused_ok;
  assign unused_ok = ^{a_r[M+1], b_r[M+1]};

endmodule
