// tb_squarer_top: end-to-end, full-size test of the 8-bit squarer.
//
// The top is instantiated with its default parameters (N = 8) and driven
// with every operand 0..255, one per 1 ns step; each 16-bit result is
// compared with v*v computed in the test. Along the way it counts how often
// each mechanism of the design is exercised and fails if one never is:
//   * diagonal terms    - some x_i*x_i = x_i bit is 1;
//   * folded products   - some cross product x_i*x_j (i < j), counted once
//                         one column left, is 1;
//   * constant column 1 - result bit 1 is 0 (checked on every operand);
//   * tree carries      - the Wallace tree's last two rows overlap, so the
//                         final carry-propagate adder must carry.
// A watchdog ends the run if it stalls.
module tb_squarer_top;

  localparam int N = 8;

  logic [N-1:0]   x;
  logic [2*N-1:0] sq;

  int checks   = 0;
  int failures = 0;
  int n_diag   = 0;
  int n_fold   = 0;
  int n_final_carry = 0;

  squarer_top dut (.x(x), .sq(sq));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      x = N'(v);
      #1;
      checks++;
      if (int'(sq) != v * v) begin
        failures++;
        if (failures < 10) $display("x=%0d: sq=%0d expected %0d", v, sq, v * v);
      end
      checks++;
      if (sq[1] != 1'b0) failures++;
      if (v != 0) n_diag++;
      if ($countones(x) >= 2) n_fold++;
      if ((dut.u_tree.row_a & dut.u_tree.row_b) != '0) n_final_carry++;
    end
    $display("diagonal terms on %0d operands, folded products on %0d, final-adder carries on %0d",
             n_diag, n_fold, n_final_carry);
    checks++;
    if (n_diag == 0 || n_fold == 0 || n_final_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
