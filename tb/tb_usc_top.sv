// tb_usc_top: end-to-end test of the improved univariate SC architecture.
//
// Three circuits run side by side for every input X = 0..255:
//   A  the default top: LFSR source, starting configuration, sin(x) core;
//   B  Sobol source, bits {7,1,4,2,0,6} selected, NG1 = 0x3C, NG2 = 0x21,
//      non-trivial permutations in SR1, SR2 and SR3, core 0.5cos(pi x)+0.5;
//   C  the basic architecture (nothing negated, original order in every
//      scrambler), LFSR source, tanh(x) core.
// Every cycle z must equal the core function recomputed from the observed
// SNs (count of ones of x_sn against the coefficient table, typed here
// independently of the package). The SNs are checked for value: over one
// source period the undelayed variable SN holds X-1 (LFSR) or X (Sobol)
// ones. The estimate of f(x) must stay within 0.35 of the target on average,
// and a z bit must appear every cycle from the first cycle after reset.
// The mechanisms of the architecture are counted through hierarchical
// references, and one that never acts is a failure: RNS negating (NG1,
// NG2), RNS scrambling (SR1, SR2), input scrambling (SR3), non-default bit
// selection, the DFF delay producing a different bit, and both RNS kinds.
module tb_usc_top;
  import usc_pkg::*;
  import usc_tb_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] x;
  logic za, zb, zc;
  logic [3:0] xa, xb, xc;
  logic [5:0] ya, yb, yc;
  int checks = 0, failures = 0;

  localparam perm_t SEL_B = {208'(0), 8'd6, 8'd0, 8'd2, 8'd4, 8'd1, 8'd7};
  localparam perm_t SR1_B = {192'(0), 8'd4, 8'd6, 8'd0, 8'd2, 8'd7, 8'd5, 8'd1, 8'd3};
  localparam perm_t SR2_B = {208'(0), 8'd2, 8'd5, 8'd0, 8'd3, 8'd1, 8'd4};
  localparam perm_t SR3_B = {224'(0), 8'd2, 8'd0, 8'd3, 8'd1};

  usc_top u_a (.clk(clk), .rst_n(rst_n), .x_bin(x), .z(za), .x_sn(xa), .y_sn(ya));
  usc_top #(
    .RNS_KIND(RNS_SOBOL), .BS_SEL(SEL_B), .NG1_MASK(8'h3C), .NG2_MASK(6'h21),
    .SR1_PERM(SR1_B), .SR2_PERM(SR2_B), .SR3_PERM(SR3_B),
    .CORE_TT(core_tt(func_coef(12)))
  ) u_b (.clk(clk), .rst_n(rst_n), .x_bin(x), .z(zb), .x_sn(xb), .y_sn(yb));
  usc_top #(
    .SR1_PERM(perm_identity(8)), .SR2_PERM(perm_identity(6)), .SR3_PERM(perm_identity(4)),
    .CORE_TT(core_tt(func_coef(6)))
  ) u_c (.clk(clk), .rst_n(rst_n), .x_bin(x), .z(zc), .x_sn(xc), .y_sn(yc));

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

  // Mechanism counters.
  int n_ng1, n_ng2, n_sr1, n_sr2, n_sr3, n_bs, n_dff, n_lfsr, n_sobol;
  initial begin
    n_ng1 = 0; n_ng2 = 0; n_sr1 = 0; n_sr2 = 0; n_sr3 = 0;
    n_bs = 0; n_dff = 0; n_lfsr = 0; n_sobol = 0;
  end
  always @(negedge clk) if (rst_n) begin
    if (u_b.u_rand.r_ng != u_b.u_rand.r_raw)      n_ng1++;
    if (u_b.u_rand.y_ng != u_b.u_rand.y_bs)       n_ng2++;
    if (u_a.u_rand.r_sr != u_a.u_rand.r_ng)       n_sr1++;
    if (u_b.u_rand.y_sn != u_b.u_rand.y_ng)       n_sr2++;
    if (u_b.u_rand.x_sn != u_b.u_rand.x_dly)      n_sr3++;
    if (u_b.u_rand.y_bs != u_b.u_rand.r_raw[5:0]) n_bs++;
    if (u_a.u_rand.x_dly[1] != u_a.u_rand.x_dly[0]) n_dff++;
    if (u_a.u_rand.g_lfsr.u_rns.r != 8'h00)       n_lfsr++;
    if (u_b.u_rand.g_sobol.u_rns.cnt == 8'hFF)    n_sobol++;
  end

  // Core function typed independently: coefficient table per circuit.
  function automatic bit core_ref(int id, logic [3:0] xs, logic [5:0] ys);
    int c1 [5] = '{0, 16, 32, 45, 54};     // sin(x)
    int c12 [5] = '{64, 64, 32, 0, 0};     // 0.5cos(pi x)+0.5
    int c6 [5] = '{0, 16, 32, 42, 49};     // tanh(x)
    int k = $countones(xs);
    int b = (id == 1) ? c1[k] : (id == 12) ? c12[k] : c6[k];
    return int'(ys) < b;
  endfunction

  initial begin
    int ca, cb, cc, sa, sb, sc;
    real ea, eb, ec, xv;
    ea = 0.0; eb = 0.0; ec = 0.0;
    for (int xi = 0; xi < 256; xi++) begin
      x = 8'(xi);
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      ca = 0; cb = 0; cc = 0; sa = 0; sb = 0; sc = 0;
      for (int t = 0; t < 256 + 3; t++) begin
        check(za == core_ref(1, xa, ya),  $sformatf("A z X=%0d t=%0d", xi, t));
        check(zb == core_ref(12, xb, yb), $sformatf("B z X=%0d t=%0d", xi, t));
        check(zc == core_ref(6, xc, yc),  $sformatf("C z X=%0d t=%0d", xi, t));
        if (t < 255) begin
          sa += int'(xa[3]);               // reverse SR3: output 3 is undelayed
          sc += int'(xc[0]);
        end
        sb += (t < 256) ? int'(xb[2]) : 0; // SR3_B: output 2 is undelayed
        if (t >= 3) begin
          if (t < 3 + 255) begin
            ca += int'(za);
            cc += int'(zc);
          end
          if (t < 3 + 256) cb += int'(zb);
        end
        @(negedge clk);
      end
      check(sa == ((xi > 0) ? xi - 1 : 0), $sformatf("A SN ones %0d X=%0d", sa, xi));
      check(sc == ((xi > 0) ? xi - 1 : 0), $sformatf("C SN ones %0d X=%0d", sc, xi));
      check(sb == xi, $sformatf("B SN ones %0d X=%0d", sb, xi));
      xv = xi / 256.0;
      ea += fabs(ca / 255.0 - target(1, xv));
      eb += fabs(cb / 256.0 - target(12, xv));
      ec += fabs(cc / 255.0 - target(6, xv));
    end
    ea /= 256.0; eb /= 256.0; ec /= 256.0;
    $display("MAE: A sin(x) LFSR %0.4f  B 0.5cos(pi x)+0.5 Sobol %0.4f  C tanh(x) basic %0.4f", ea, eb, ec);
    check(ea < 0.35, "A MAE");
    check(eb < 0.35, "B MAE");
    check(ec < 0.35, "C MAE");
    $display("mechanisms: NG1 %0d NG2 %0d SR1 %0d SR2 %0d SR3 %0d BS %0d DFF %0d LFSR %0d Sobol-wrap %0d",
             n_ng1, n_ng2, n_sr1, n_sr2, n_sr3, n_bs, n_dff, n_lfsr, n_sobol);
    check(n_ng1 > 0, "RNS negating NG1 never acted");
    check(n_ng2 > 0, "RNS negating NG2 never acted");
    check(n_sr1 > 0, "RNS scrambling SR1 never acted");
    check(n_sr2 > 0, "RNS scrambling SR2 never acted");
    check(n_sr3 > 0, "input scrambling SR3 never acted");
    check(n_bs > 0, "bit selection never differed from default");
    check(n_dff > 0, "DFF insertion never delayed a differing bit");
    check(n_lfsr > 0, "LFSR source never ran");
    check(n_sobol > 0, "Sobol source never completed a period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
