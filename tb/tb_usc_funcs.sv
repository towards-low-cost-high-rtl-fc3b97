// tb_usc_funcs: accuracy of the architecture on the twelve target functions
// (N = 8, D = 4, M = 6), with an LFSR source (IL) and a Sobol source (IS).
// Four circuits per function: the tuned LFSR and Sobol configurations of
// usc_cfg_pkg, and, for comparison, the untuned starting configuration with
// each source. For every X in 0..255 the circuits are reset, run D-1 cycles
// to fill the delay chain, and then one source period (255 cycles for the
// LFSR, 256 for Sobol) while the ones of z are counted.
// The printed table gives per function the approximation error of the core
// polynomial alone (baseline MAE) and the MAE of each circuit, the tuned ones
// also normalised to the baseline.
// Checks: each run lasts one period; each tuned circuit reproduces the error
// its configuration was selected with (mae_ppm, from an independent
// cycle-exact model) to within 2 millionths; every MAE is below 0.35.
module tb_usc_funcs;
  import usc_pkg::*;
  import usc_cfg_pkg::*;
  import usc_tb_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] x;
  logic [11:0] z_l, z_s, z_l0, z_s0;
  int checks = 0, failures = 0;

  for (genvar f = 0; f < 12; f++) begin : g_f
    localparam cfg_t CL = tuned(RNS_LFSR, f + 1);
    localparam cfg_t CS = tuned(RNS_SOBOL, f + 1);
    usc_top #(
      .RNS_KIND(RNS_LFSR), .LFSR_TAPS(CL.rns), .BS_SEL(CL.bs), .NG1_MASK(CL.ng1),
      .NG2_MASK(CL.ng2), .SR1_PERM(CL.sr1), .SR2_PERM(CL.sr2), .SR3_PERM(CL.sr3),
      .CORE_TT(core_tt(func_coef(f + 1)))
    ) u_il (.clk(clk), .rst_n(rst_n), .x_bin(x), .z(z_l[f]), .x_sn(), .y_sn());
    usc_top #(
      .RNS_KIND(RNS_SOBOL), .SOBOL_DIR(sobol_dirv(int'(CS.rns), 8)), .BS_SEL(CS.bs),
      .NG1_MASK(CS.ng1), .NG2_MASK(CS.ng2), .SR1_PERM(CS.sr1), .SR2_PERM(CS.sr2),
      .SR3_PERM(CS.sr3), .CORE_TT(core_tt(func_coef(f + 1)))
    ) u_is (.clk(clk), .rst_n(rst_n), .x_bin(x), .z(z_s[f]), .x_sn(), .y_sn());
    usc_top #(.CORE_TT(core_tt(func_coef(f + 1)))) u_l0 (
      .clk(clk), .rst_n(rst_n), .x_bin(x), .z(z_l0[f]), .x_sn(), .y_sn());
    usc_top #(.RNS_KIND(RNS_SOBOL), .CORE_TT(core_tt(func_coef(f + 1)))) u_s0 (
      .clk(clk), .rst_n(rst_n), .x_bin(x), .z(z_s0[f]), .x_sn(), .y_sn());
  end

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cl [12], cs [12], cl0 [12], cs0 [12];
    real el [12], es [12], el0 [12], es0 [12], eb [12];
    real xv, fx, gl, gs;
    bcoef_t c;
    cfg_t cf;
    int cycles;
    for (int f = 0; f < 12; f++) begin
      el[f] = 0.0; es[f] = 0.0; el0[f] = 0.0; es0[f] = 0.0; eb[f] = 0.0;
    end
    for (int xi = 0; xi < 256; xi++) begin
      x = 8'(xi);
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      repeat (3) @(negedge clk);
      for (int f = 0; f < 12; f++) begin cl[f] = 0; cs[f] = 0; cl0[f] = 0; cs0[f] = 0; end
      cycles = 0;
      for (int t = 0; t < 256; t++) begin
        for (int f = 0; f < 12; f++) begin
          if (t < 255) begin
            cl[f]  += int'(z_l[f]);
            cl0[f] += int'(z_l0[f]);
          end
          cs[f]  += int'(z_s[f]);
          cs0[f] += int'(z_s0[f]);
        end
        cycles++;
        @(negedge clk);
      end
      checks++;
      if (cycles != 256) failures++;
      xv = xi / 256.0;
      for (int f = 0; f < 12; f++) begin
        c  = func_coef(f + 1);
        fx = target(f + 1, xv);
        eb[f]  += fabs(bern4(int'(c[0]), int'(c[1]), int'(c[2]), int'(c[3]), int'(c[4]), xv) - fx);
        el[f]  += fabs(cl[f] / 255.0 - fx);
        es[f]  += fabs(cs[f] / 256.0 - fx);
        el0[f] += fabs(cl0[f] / 255.0 - fx);
        es0[f] += fabs(cs0[f] / 256.0 - fx);
      end
    end
    $display("ID  baseline | tuned LFSR  norm | tuned Sobol  norm | start LFSR  start Sobol");
    gl = 1.0; gs = 1.0;
    for (int f = 0; f < 12; f++) begin
      eb[f] /= 256.0; el[f] /= 256.0; es[f] /= 256.0; el0[f] /= 256.0; es0[f] /= 256.0;
      gl *= el[f] / eb[f];
      gs *= es[f] / eb[f];
      $display("%2d  %7.4f  |   %7.4f  %5.2f |    %7.4f  %5.2f |   %7.4f     %7.4f", f + 1, eb[f],
               el[f], el[f] / eb[f], es[f], es[f] / eb[f], el0[f], es0[f]);
      cf = tuned(RNS_LFSR, f + 1);
      checks++;
      if (fabs(el[f] * 1.0e6 - real'(cf.mae_ppm)) > 2.0) begin
        failures++; $display("FAIL tuned LFSR f%0d: %0.6f, expected %0d ppm", f + 1, el[f], cf.mae_ppm);
      end
      cf = tuned(RNS_SOBOL, f + 1);
      checks++;
      if (fabs(es[f] * 1.0e6 - real'(cf.mae_ppm)) > 2.0) begin
        failures++; $display("FAIL tuned Sobol f%0d: %0.6f, expected %0d ppm", f + 1, es[f], cf.mae_ppm);
      end
      checks += 4;
      if (el[f] >= 0.35 || es[f] >= 0.35 || el0[f] >= 0.35 || es0[f] >= 0.35) begin
        failures++; $display("FAIL MAE bound f%0d", f + 1);
      end
    end
    $display("geometric mean of normalised MAE: tuned LFSR %0.2f, tuned Sobol %0.2f",
             gl ** (1.0 / 12.0), gs ** (1.0 / 12.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
