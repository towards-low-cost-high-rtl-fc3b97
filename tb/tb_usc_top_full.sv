// tb_usc_top_full: the top at its default parameters (N = 8, D = 4, M = 6,
// LFSR source, starting configuration, sin(x) core), taken through one
// complete evaluation: all 256 inputs X, each for D-1 cycles of delay-chain
// fill and one LFSR period of 255 cycles. Checks every output bit against
// the core function recomputed from the observed SNs, the value of the
// generated variable SN (X-1 ones per period) and of each 0.5 SN (128 ones
// per period), and that the mean absolute error against sin(x) stays
// below 0.05.
module tb_usc_top_full;
  import usc_tb_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] x;
  logic z;
  logic [3:0] xs;
  logic [5:0] ys;
  int checks = 0, failures = 0;

  usc_top u_dut (.clk(clk), .rst_n(rst_n), .x_bin(x), .z(z), .x_sn(xs), .y_sn(ys));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int coef [5] = '{0, 16, 32, 45, 54};
    int cz, cx, cy [6];
    real mae;
    mae = 0.0;
    for (int xi = 0; xi < 256; xi++) begin
      x = 8'(xi);
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      cz = 0; cx = 0;
      foreach (cy[j]) cy[j] = 0;
      for (int t = 0; t < 255 + 3; t++) begin
        check(z == (int'(ys) < coef[$countones(xs)]), $sformatf("z X=%0d t=%0d", xi, t));
        if (t < 255) begin
          cx += int'(xs[3]);
          foreach (cy[j]) cy[j] += int'(ys[j]);
        end
        if (t >= 3) cz += int'(z);
        @(negedge clk);
      end
      check(cx == ((xi > 0) ? xi - 1 : 0), $sformatf("variable SN ones %0d X=%0d", cx, xi));
      foreach (cy[j]) check(cy[j] == 128, $sformatf("0.5 SN %0d ones %0d", j, cy[j]));
      mae += fabs(cz / 255.0 - $sin(xi / 256.0));
    end
    mae /= 256.0;
    $display("MAE of sin(x) over all 256 inputs: %0.4f", mae);
    check(mae < 0.05, "MAE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
