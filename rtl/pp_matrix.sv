// pp_matrix: the AND-node matrix of the Matrix-Diagonal multiplier.
//
// The two operands are laid out as the rows and columns of an N x N matrix.
// Node (i,j) is a single AND gate of multiplier bit y_in[i] and multiplicand
// bit x_in[j]; its output has weight 2^(i+j), so every diagonal i+j == k of
// the matrix collects the partial-product bits of one product weight. All
// N*N nodes work concurrently.
// Interface: x_in, y_in (N bits each, unsigned) in; pp[i][j] out.
// Timing: combinational, one gate delay.
// The matrix and AND nodes follow the method; the index convention
// (row = multiplier bit, column = multiplicand bit) is this design's choice.
module pp_matrix #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]         x_in,
  input  logic [N-1:0]         y_in,
  output logic [N-1:0][N-1:0]  pp
);

  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        pp[i][j] = y_in[i] & x_in[j];
  end

endmodule
