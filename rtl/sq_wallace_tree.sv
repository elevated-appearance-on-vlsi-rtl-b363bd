// sq_wallace_tree: sums the squarer's partial-product matrix.
//
// The matrix arrives column by column (pp[c][r], weight 2^c, heights given
// by sq_pkg::pp_height). Layers of full adders (3 bits -> sum + carry) and
// half adders (2 bits -> sum + carry) work on every column in parallel;
// each layer's sums stay in their column and its carries move one column
// up into the next layer. After sq_pkg::wt_layers(N) layers (2 for N = 8:
// 11 full and 11 half adders, column 8 going 5 -> 3 -> 2 bits) no column
// holds more than two bits, and a carry-propagate adder adds the two
// remaining rows into the 2N-bit result.
//
// The adders of every layer are instantiated by the generate loops below
// from the heights the package computes, so the tree is the same for any N.
// Inside column c of layer l+1 the bits are ordered: sums of the layer-l
// full adders, the half-adder sum, pass-through bits, then the carries
// arriving from column c-1 (full adders first). Carries out of the top
// column are left open: the sum of a square's matrix never reaches 2^(2N),
// so they are always zero. For any other matrix the result is the sum
// modulo 2^(2N).
//
// Combinational, no clock. The use of a Wallace tree follows the design
// description; its reduction rule (see sq_pkg) and the final adder, written
// as a behavioural '+' for the synthesis tool to map, are this design's
// choice.
module sq_wallace_tree
  import sq_pkg::*;
#(
  parameter int N  = 8,
  parameter int HM = wt_max_height(N)
) (
  input  logic [2*N-1:0][HM-1:0] pp,
  output logic [2*N-1:0]         sum
);

  localparam int COLS = 2 * N;
  localparam int L    = wt_layers(N);

  // m[l] is the matrix entering layer l; m[L] holds at most two rows.
  wire logic [COLS-1:0][HM-1:0] m [L+1];

  for (genvar c = 0; c < COLS; c++) begin : g_in
    localparam int H0 = pp_height(N, c);
    for (genvar r = 0; r < HM; r++) begin : g_row
      if (r < H0) begin : g_use
        assign m[0][c][r] = pp[c][r];
      end else begin : g_zero
        assign m[0][c][r] = 1'b0;
      end
    end
  end

  for (genvar l = 0; l < L; l++) begin : g_layer
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int NFA  = wt_nfa(N, l, c);
      localparam int NHA  = wt_nha(N, l, c);
      localparam int NPS  = wt_npass(N, l, c);
      // Where this column's carries land in column c+1 of the next layer.
      localparam int CBASE = (c + 1 < COLS)
                             ? wt_nfa(N, l, c + 1) + wt_nha(N, l, c + 1) + wt_npass(N, l, c + 1)
                             : 0;
      localparam int HN   = wt_height(N, l + 1, c);

      for (genvar k = 0; k < NFA; k++) begin : g_fa
        logic co;
        sq_full_adder u_fa (
          .a (m[l][c][3*k]),
          .b (m[l][c][3*k+1]),
          .ci(m[l][c][3*k+2]),
          .s (m[l+1][c][k]),
          .co(co)
        );
        if (c + 1 < COLS) begin : g_carry
          assign m[l+1][c+1][CBASE + k] = co;
        end
      end

      if (NHA == 1) begin : g_ha
        logic co;
        sq_half_adder u_ha (
          .a (m[l][c][3*NFA]),
          .b (m[l][c][3*NFA+1]),
          .s (m[l+1][c][NFA]),
          .co(co)
        );
        if (c + 1 < COLS) begin : g_carry
          assign m[l+1][c+1][CBASE + NFA] = co;
        end
      end

      for (genvar p = 0; p < NPS; p++) begin : g_pass
        assign m[l+1][c][NFA + NHA + p] = m[l][c][3*NFA + p];
      end

      for (genvar r = HN; r < HM; r++) begin : g_zero
        assign m[l+1][c][r] = 1'b0;
      end
    end
  end

  // Final carry-propagate adder over the (at most) two remaining rows.
  logic [COLS-1:0] row_a, row_b;

  for (genvar c = 0; c < COLS; c++) begin : g_final
    assign row_a[c] = m[L][c][0];
    assign row_b[c] = m[L][c][1];
  end

  assign sum = row_a + row_b;

endmodule
