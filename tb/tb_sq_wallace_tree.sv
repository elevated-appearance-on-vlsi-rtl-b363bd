// tb_sq_wallace_tree: self-checking test of the Wallace-tree summer at N = 8.
//
// The tree must add every bit of its input matrix at its column weight.
// The test fills the used rows of each column (heights from the squarer's
// matrix geometry) with random bits, plus the all-ones and all-zeros
// matrices and every matrix with a single one, and compares the 16-bit
// output with the weighted bit count modulo 2^16, computed in the test.
// It also checks the tree geometry for N = 8: two layers of 11 full and 11
// half adders (worked by hand from the column heights 1 0 2 1 3 2 4 3 5 3 4
// 2 3 1 2 0, LSB first). One matrix per 1 ns step; a watchdog ends
// the run if it stalls.
module tb_sq_wallace_tree;
  import sq_pkg::*;

  localparam int N  = 8;
  localparam int HM = wt_max_height(N);

  logic [2*N-1:0][HM-1:0] pp;
  logic [2*N-1:0]         sum;

  int checks   = 0;
  int failures = 0;

  sq_wallace_tree #(.N(N), .HM(HM)) dut (.pp(pp), .sum(sum));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    longint w;
    logic [2*N-1:0] exp_sum;
    #1;
    w = 0;
    for (int c = 0; c < 2 * N; c++) w += longint'($countones(pp[c])) << c;
    exp_sum = (2*N)'(w);
    checks++;
    if (sum !== exp_sum) begin
      failures++;
      if (failures < 10) $display("sum=%0h expected %0h", sum, exp_sum);
    end
  endtask

  initial begin
    checks++;
    if (wt_layers(N) != 2 || wt_total_fa(N) != 11 || wt_total_ha(N) != 11) begin
      failures++;
      $display("layers=%0d fa=%0d ha=%0d, expected 2, 11, 11", wt_layers(N), wt_total_fa(N), wt_total_ha(N));
    end
    // all zero / all ones in used rows
    pp = '0;
    check_one();
    for (int c = 0; c < 2 * N; c++)
      for (int r = 0; r < HM; r++) pp[c][r] = (r < pp_height(N, c));
    check_one();
    // single ones
    for (int c = 0; c < 2 * N; c++)
      for (int r = 0; r < pp_height(N, c); r++) begin
        pp = '0;
        pp[c][r] = 1'b1;
        check_one();
      end
    // random matrices
    for (int t = 0; t < 20000; t++) begin
      for (int c = 0; c < 2 * N; c++)
        for (int r = 0; r < HM; r++) pp[c][r] = (r < pp_height(N, c)) ? 1'($urandom) : 1'b0;
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
