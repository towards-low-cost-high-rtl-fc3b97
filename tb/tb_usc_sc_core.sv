// tb_usc_sc_core: self-checking test of the combinational SC core.
// Default core (sin(x), degree-4 Bernstein coefficients 0,16,32,45,54 in
// units of 1/64): exhaustive over all 1024 input patterns, z must be 1 when
// the 0.5-SN number is below the coefficient picked by the count of ones of
// the variable SNs. The output probability for independent inputs is then
// computed from the truth table and compared with the Bernstein polynomial
// at several x. A second instance loads the three-input x + x^2 - x^3 core.
module tb_usc_sc_core;
  import usc_pkg::*;
  logic [3:0] xs;
  logic [5:0] ys;
  logic z;
  logic [2:0] xs3;
  logic y1;
  logic z3;
  int checks = 0, failures = 0;

  usc_sc_core u_a (.x_sn(xs), .y_sn(ys), .z(z));
  usc_sc_core #(.D(3), .M(1), .TT(core_tt_fig6())) u_b (.x_sn(xs3), .y_sn(y1), .z(z3));

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int coef [5] = '{0, 16, 32, 45, 54};
    int zcnt [16];
    int k;
    real x, p, e, w;
    for (int a = 0; a < 16; a++) begin
      zcnt[a] = 0;
      k = 0;
      for (int i = 0; i < 4; i++) k += (a >> i) & 1;
      for (int b = 0; b < 64; b++) begin
        xs = 4'(a); ys = 6'(b); #1;
        checks++;
        if (z != (b < coef[k])) begin failures++; $display("FAIL x=%b y=%0d z=%b", xs, b, z); end
        zcnt[a] += int'(z);
      end
    end
    // Output value for independent variable SNs of value x.
    for (int xi = 0; xi <= 8; xi++) begin
      x = xi / 8.0;
      p = 0.0;
      for (int a = 0; a < 16; a++) begin
        w = 1.0;
        for (int i = 0; i < 4; i++) w *= (((a >> i) & 1) != 0) ? x : (1.0 - x);
        p += w * zcnt[a] / 64.0;
      end
      e = coef[0] * (1-x)**4 + 4 * coef[1] * x * (1-x)**3 + 6 * coef[2] * x**2 * (1-x)**2
        + 4 * coef[3] * x**3 * (1-x) + coef[4] * x**4;
      e = e / 64.0;
      checks++;
      if ((p - e) > 1e-9 || (e - p) > 1e-9) begin failures++; $display("FAIL poly x=%f p=%f e=%f", x, p, e); end
    end
    for (int a = 0; a < 16; a++) begin
      xs3 = 3'(a >> 1); y1 = 1'(a); #1;
      checks++;
      if (z3 != (xs3[0] | (xs3[1] & xs3[2]))) begin failures++; $display("FAIL fig6 %b", xs3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
