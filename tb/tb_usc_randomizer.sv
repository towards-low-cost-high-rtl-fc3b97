// tb_usc_randomizer: self-checking test of the improved randomizer.
// Two instances: (A) the default configuration with an LFSR source, and (B)
// a Sobol source with non-trivial bit selection, negation masks and
// permutations in all three scramblers. A behavioural reference model in the
// testbench regenerates the random numbers, applies negation, scrambling,
// comparison and delay, and the outputs are compared every cycle. Counts of
// ones are also checked: over one full source period the generated variable
// SN holds exactly X-1 ones (LFSR, which skips 0) or X ones (Sobol), and
// each 0.5 SN holds 128 ones out of 255 (LFSR) or 128 of 256 (Sobol).
module tb_usc_randomizer;
  import usc_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] x;
  logic [3:0] xa, xb;
  logic [5:0] ya, yb;
  int checks = 0, failures = 0;

  localparam perm_t SEL_B = {208'(0), 8'd6, 8'd0, 8'd2, 8'd4, 8'd1, 8'd7};
  localparam perm_t SR1_B = {192'(0), 8'd4, 8'd6, 8'd0, 8'd2, 8'd7, 8'd5, 8'd1, 8'd3};
  localparam perm_t SR2_B = {208'(0), 8'd2, 8'd5, 8'd0, 8'd3, 8'd1, 8'd4};
  localparam perm_t SR3_B = {224'(0), 8'd2, 8'd0, 8'd3, 8'd1};

  usc_randomizer u_a (.clk(clk), .rst_n(rst_n), .x_bin(x), .x_sn(xa), .y_sn(ya));
  usc_randomizer #(
    .RNS_KIND(RNS_SOBOL), .BS_SEL(SEL_B), .NG1_MASK(8'h3C), .NG2_MASK(6'h21),
    .SR1_PERM(SR1_B), .SR2_PERM(SR2_B), .SR3_PERM(SR3_B)
  ) u_b (.clk(clk), .rst_n(rst_n), .x_bin(x), .x_sn(xb), .y_sn(yb));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model state.
  logic [7:0] lfsr_m;
  logic [7:0] sob_m;
  int         k_m;
  bit         ha [$], hb [$];

  function automatic logic [7:0] sobol_at(int k);
    logic [7:0] g = 8'(k ^ (k >> 1));
    logic [7:0] r = '0;
    for (int i = 0; i < 8; i++) if (g[i]) r ^= 8'(1 << (7 - i));
    return r;
  endfunction

  initial begin
    automatic int xs [6] = '{0, 1, 37, 128, 200, 255};
    automatic int sel_b [6] = '{7, 1, 4, 2, 0, 6};
    automatic int sr1_b [8] = '{3, 1, 5, 7, 2, 0, 6, 4};
    automatic int sr2_b [6] = '{4, 1, 3, 0, 5, 2};
    automatic int sr3_b [4] = '{1, 3, 0, 2};
    logic [7:0] ra, rb, sa, sb;
    logic [5:0] eya, eyb, tb6;
    logic [3:0] exa, exb, da, db;
    int ones_a, ones_b, ya0, yb0;

    foreach (xs[n]) begin
      x = 8'(xs[n]);
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      lfsr_m = 8'h01; k_m = 0;
      ha.delete(); hb.delete();
      ones_a = 0; ones_b = 0; ya0 = 0; yb0 = 0;
      for (int t = 0; t < 256; t++) begin
        // (A) LFSR, no negation, reverse order everywhere.
        ra = lfsr_m;
        for (int i = 0; i < 8; i++) sa[i] = ra[7 - i];
        ha.push_front(sa < x);
        for (int k = 0; k < 4; k++) da[k] = (k < ha.size()) ? ha[k] : 1'b0;
        for (int i = 0; i < 4; i++) exa[i] = da[3 - i];
        for (int j = 0; j < 6; j++) eya[j] = ra[5 - j];
        // (B) Sobol with the configured selection, masks and permutations.
        sob_m = sobol_at(k_m);
        rb = sob_m ^ 8'h3C;
        for (int i = 0; i < 8; i++) sb[i] = rb[sr1_b[i]];
        hb.push_front(sb < x);
        for (int k = 0; k < 4; k++) db[k] = (k < hb.size()) ? hb[k] : 1'b0;
        for (int i = 0; i < 4; i++) exb[i] = db[sr3_b[i]];
        for (int j = 0; j < 6; j++) tb6[j] = sob_m[sel_b[j]];
        tb6 ^= 6'h21;
        for (int j = 0; j < 6; j++) eyb[j] = tb6[sr2_b[j]];
        #1;
        check(xa == exa, $sformatf("A x_sn X=%0d t=%0d got %b exp %b", x, t, xa, exa));
        check(ya == eya, $sformatf("A y_sn X=%0d t=%0d got %b exp %b", x, t, ya, eya));
        check(xb == exb, $sformatf("B x_sn X=%0d t=%0d got %b exp %b", x, t, xb, exb));
        check(yb == eyb, $sformatf("B y_sn X=%0d t=%0d got %b exp %b", x, t, yb, eyb));
        if (t < 255) begin
          ones_a += int'(xa[3]);
          ya0    += int'(ya[2]);
        end
        ones_b += int'(xb[2]);    // SR3_B routes the undelayed SN to output 2
        yb0    += int'(yb[0]);
        @(negedge clk);
        lfsr_m = {lfsr_m[6:0], lfsr_m[7] ^ lfsr_m[5] ^ lfsr_m[4] ^ lfsr_m[3]};
        k_m++;
      end
      check(ones_a == ((xs[n] > 0) ? xs[n] - 1 : 0), $sformatf("A ones %0d for X=%0d", ones_a, xs[n]));
      check(ones_b == xs[n], $sformatf("B ones %0d for X=%0d", ones_b, xs[n]));
      check(ya0 == 128, $sformatf("A 0.5 SN ones %0d", ya0));
      check(yb0 == 128, $sformatf("B 0.5 SN ones %0d", yb0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
