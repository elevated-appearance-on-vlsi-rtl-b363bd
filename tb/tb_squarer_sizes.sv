// tb_squarer_sizes: the squarer at the other evaluated operand widths.
//
// Besides the 8-bit design, 4-, 6- and 7-bit squarers are built from the
// same RTL by setting N. This test instantiates the top at N = 4, 6 and 7
// and squares every operand of each width, comparing with v*v computed in
// the test; each also must show result bit 1 at 0. One operand per 1 ns
// step; a watchdog ends the run if it stalls.
module tb_squarer_sizes;

  logic [3:0]  x4;
  logic [5:0]  x6;
  logic [6:0]  x7;
  logic [7:0]  sq4;
  logic [11:0] sq6;
  logic [13:0] sq7;

  int checks   = 0;
  int failures = 0;

  squarer_top #(.N(4)) dut4 (.x(x4), .sq(sq4));
  squarer_top #(.N(6)) dut6 (.x(x6), .sq(sq6));
  squarer_top #(.N(7)) dut7 (.x(x7), .sq(sq7));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int n, input int v, input int got);
    checks++;
    if (got != v * v || got[1]) begin
      failures++;
      if (failures < 10) $display("N=%0d x=%0d: sq=%0d expected %0d", n, v, got, v * v);
    end
  endtask

  initial begin
    x4 = '0;
    x6 = '0;
    x7 = '0;
    for (int v = 0; v < 128; v++) begin
      x4 = 4'(v);
      x6 = 6'(v);
      x7 = 7'(v);
      #1;
      if (v < 16) check(4, v, int'(sq4));
      if (v < 64) check(6, v, int'(sq6));
      check(7, v, int'(sq7));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
