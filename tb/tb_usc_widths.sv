// tb_usc_widths: the architecture with a 6-bit and a 7-bit random number
// source (d = 4, m = 6, sin(x) core, starting configuration), each with an
// LFSR (default maximal-length taps for the width) and a Sobol source.
// For every input X in 0..2^N-1 each circuit is reset, run D-1 cycles, then
// one source period (2^N-1 cycles for the LFSR, 2^N for Sobol) while the
// ones of z and of the undelayed variable SN are counted. Checks: the
// variable SN holds exactly X-1 (LFSR) or X (Sobol) ones per period, and the
// MAE against sin(x) is below 0.35; the MAEs are printed.
module tb_usc_widths;
  import usc_pkg::*;
  import usc_tb_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [6:0] x7;
  logic [5:0] x6;
  logic [3:0] zs;            // {N=7 Sobol, N=7 LFSR, N=6 Sobol, N=6 LFSR}
  logic [3:0] xs [4];
  int checks = 0, failures = 0;

  usc_top #(.N(6)) u_6l (.clk(clk), .rst_n(rst_n), .x_bin(x6), .z(zs[0]), .x_sn(xs[0]), .y_sn());
  usc_top #(.N(6), .RNS_KIND(RNS_SOBOL)) u_6s (
    .clk(clk), .rst_n(rst_n), .x_bin(x6), .z(zs[1]), .x_sn(xs[1]), .y_sn());
  usc_top #(.N(7)) u_7l (.clk(clk), .rst_n(rst_n), .x_bin(x7), .z(zs[2]), .x_sn(xs[2]), .y_sn());
  usc_top #(.N(7), .RNS_KIND(RNS_SOBOL)) u_7s (
    .clk(clk), .rst_n(rst_n), .x_bin(x7), .z(zs[3]), .x_sn(xs[3]), .y_sn());

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
    int nbits, per, cz, cx;
    real err;
    for (int c = 0; c < 4; c++) begin
      nbits = (c < 2) ? 6 : 7;
      err = 0.0;
      for (int xi = 0; xi < 2 ** nbits; xi++) begin
        x6 = 6'(xi); x7 = 7'(xi);
        rst_n = 1'b0;
        repeat (2) @(negedge clk);
        rst_n = 1'b1;
        repeat (3) @(negedge clk);
        per = (c % 2 == 0) ? 2 ** nbits - 1 : 2 ** nbits;
        cz = 0; cx = 0;
        for (int t = 0; t < per; t++) begin
          cz += int'(zs[c]);
          cx += int'(xs[c][3]);         // reverse SR3: output 3 is undelayed
          @(negedge clk);
        end
        check(cx == ((c % 2 == 0) ? ((xi > 0) ? xi - 1 : 0) : xi),
              $sformatf("circuit %0d X=%0d SN ones %0d", c, xi, cx));
        err += fabs(real'(cz) / per - $sin(real'(xi) / 2.0 ** nbits));
      end
      err /= 2.0 ** nbits;
      $display("N=%0d %s: MAE %0.4f", nbits, (c % 2 == 0) ? "LFSR " : "Sobol", err);
      check(err < 0.35, "MAE bound");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
