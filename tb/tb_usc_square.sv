// tb_usc_square: the smallest instance of the architecture, an SC squarer
// f(x) = x^2 with d = 2: one Sobol generator (first dimension, bits in
// original order), one delay flip-flop and an AND core, z = x0 & x1. The
// single 0.5 SN is unused. For every X the circuit is reset, run one cycle to
// fill the flip-flop and then one period of 256 cycles. Checks: every z bit
// equals the AND of the two observed variable SNs, the undelayed SN holds X
// ones per period, and the MAE against x^2 is 0.022466 (from an independent
// cycle model of this configuration) to within one millionth.
module tb_usc_square;
  import usc_pkg::*;
  import usc_tb_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] x;
  logic z;
  logic [1:0] xs;
  int checks = 0, failures = 0;

  // Truth table indexed by {x1, x0, y}: z = 1 at indices 6 and 7.
  localparam logic [7:0] AND_TT = 8'b1100_0000;

  usc_top #(.D(2), .M(1), .RNS_KIND(RNS_SOBOL), .SR1_PERM(perm_identity(8)),
            .SR2_PERM(perm_identity(1)), .SR3_PERM(perm_identity(2)), .CORE_TT(AND_TT))
    u_dut (.clk(clk), .rst_n(rst_n), .x_bin(x), .z(z), .x_sn(xs), .y_sn());

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cz, cx;
    real err, xv;
    err = 0.0;
    for (int xi = 0; xi < 256; xi++) begin
      x = 8'(xi);
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      @(negedge clk);
      cz = 0; cx = 0;
      for (int t = 0; t < 256; t++) begin
        check(z == (xs[0] & xs[1]), $sformatf("z X=%0d t=%0d", xi, t));
        cz += int'(z);
        cx += int'(xs[0]);
        @(negedge clk);
      end
      check(cx == xi, $sformatf("SN ones %0d for X=%0d", cx, xi));
      xv = xi / 256.0;
      err += fabs(cz / 256.0 - xv * xv);
    end
    err /= 256.0;
    $display("squarer with one shared generator and one DFF: MAE %0.6f", err);
    check(fabs(err - 0.022466) < 1.0e-6, "MAE of the squarer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
