// squarer_top: combinational parallel N-bit unsigned squarer, sq = x * x.
//
// A squarer is cheaper than a general multiplier because its partial-product
// matrix is redundant: the diagonal products x_i*x_i are just x_i, and every
// off-diagonal product appears twice in the same column. sq_pp_gen removes
// that redundancy (N(N-1)/2 AND gates instead of N*N) and sq_wallace_tree
// sums the much smaller matrix with full/half-adder layers and a final
// carry-propagate adder.
//
// Interface: x (N bits, unsigned) in, sq (2N bits) out. There is no clock,
// register or handshake: sq follows x after the combinational delay of the
// generator, the tree layers and the final adder. N defaults to 8, the
// design's main configuration; 4, 6 and 7 are the other evaluated sizes.
// The folded matrix and the use of a Wallace tree follow the design
// description; the unsigned operand and the purely combinational timing are
// this design's choices.
module squarer_top
  import sq_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0]   x,
  output logic [2*N-1:0] sq
);

  localparam int HM = wt_max_height(N);

  logic [2*N-1:0][HM-1:0] pp;

  sq_pp_gen #(.N(N), .HM(HM)) u_pp_gen (
    .x (x),
    .pp(pp)
  );

  sq_wallace_tree #(.N(N), .HM(HM)) u_tree (
    .pp (pp),
    .sum(sq)
  );

endmodule
