// sq_pp_gen: partial-product generator of the squarer.
//
// A multiplier would form all N*N products x_i*x_j. Squaring lets two
// simplifications remove most of them, and both are the core of the design:
//   * x_i*x_i = x_i, so the diagonal needs no gate: bit x_i goes straight
//     into column 2i;
//   * x_i*x_j and x_j*x_i (i < j) are the same bit and sit in the same
//     column i+j. Their sum is that bit times two, so one copy moves one
//     column left, into i+j+1, and the other is dropped.
// What is left is N(N-1)/2 AND gates plus N wires. For N = 8 the column
// contents, from 2^0 up, are:
//   x0 | 0 | x1x0 x1 | x0x2 | x1x2 x0x3 x2 | x1x3 x0x4 | ... | x7x6 x7
//
// Output pp[c][r] is row r of column c. Each column holds its folded cross
// products stacked by ascending lower index, then its diagonal bit; the
// height of every column is sq_pkg::pp_height(N, c), and rows above it are
// driven to zero. Column 1 is always empty. The block is combinational with
// no clock. The two simplifications and the resulting column contents follow
// the design description; the order of rows within a column is this
// design's choice.
module sq_pp_gen
  import sq_pkg::*;
#(
  parameter int N  = 8,
  parameter int HM = wt_max_height(N)   // rows of the matrix bus
) (
  input  logic [N-1:0]              x,
  output logic [2*N-1:0][HM-1:0]    pp
);

  for (genvar c = 0; c < 2 * N; c++) begin : g_col
    localparam int H = pp_height(N, c);

    // Folded cross products x_i*x_j with i + j + 1 == c, i < j < N.
    for (genvar i = 0; i < N; i++) begin : g_cross
      localparam int J = c - 1 - i;
      if (J > i && J < N) begin : g_and
        assign pp[c][pp_cross_row(N, c, i)] = x[i] & x[J];
      end
    end

    // Diagonal term x_i*x_i = x_i in column 2i, on top of the column.
    if (c % 2 == 0 && c / 2 < N) begin : g_diag
      assign pp[c][H-1] = x[c/2];
    end

    // Unused rows.
    for (genvar r = H; r < HM; r++) begin : g_zero
      assign pp[c][r] = 1'b0;
    end
  end

endmodule
