// tb_sq_pp_gen: exhaustive self-checking test of the partial-product
// generator at N = 8.
//
// For every x in 0..255 it forms, independently of the block, the number of
// ones each column of the simplified squaring matrix must hold: cross
// products x_i&x_j (i < j) count in column i+j+1, diagonal bits x_i in column
// 2i. It then checks, per column, that the block's rows hold exactly that
// many ones (so unused rows must be zero), that column 1 is empty, and that
// the weighted sum of all matrix bits equals x*x. One x is applied per 1 ns
// step; a watchdog ends the run if it stalls.
module tb_sq_pp_gen;
  import sq_pkg::*;

  localparam int N  = 8;
  localparam int HM = wt_max_height(N);

  logic [N-1:0]           x;
  logic [2*N-1:0][HM-1:0] pp;

  int checks   = 0;
  int failures = 0;

  sq_pp_gen #(.N(N), .HM(HM)) dut (.x(x), .pp(pp));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_ones [2*N];
    int got_ones;
    longint weighted;
    for (int v = 0; v < (1 << N); v++) begin
      x = N'(v);
      #1;
      for (int c = 0; c < 2 * N; c++) exp_ones[c] = 0;
      for (int i = 0; i < N; i++) begin
        if (x[i]) exp_ones[2*i]++;
        for (int j = i + 1; j < N; j++) if (x[i] && x[j]) exp_ones[i+j+1]++;
      end
      weighted = 0;
      for (int c = 0; c < 2 * N; c++) begin
        got_ones = $countones(pp[c]);
        weighted += longint'(got_ones) << c;
        checks++;
        if (got_ones != exp_ones[c]) begin
          failures++;
          if (failures < 10)
            $display("x=%0d column %0d: %0d ones, expected %0d", v, c, got_ones, exp_ones[c]);
        end
      end
      checks++;
      if (pp[1] != '0) failures++;
      checks++;
      if (weighted != longint'(v) * longint'(v)) begin
        failures++;
        if (failures < 10) $display("x=%0d: matrix sums to %0d", v, weighted);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
