// tb_usc_fig6: input scrambling on a three-input example, f(x) = x + x^2 - x^3,
// realised by the core z = a | (b & c) with three variable SNs from one
// 8-bit LFSR and two delay flip-flops (D = 3; the single 0.5 SN is unused).
// Six circuits differ only in the input scrambling SR3, one per permutation
// of the three variable SNs. Each is run over all 256 inputs for one LFSR
// period, and the mean absolute error against f is printed per permutation.
// Checks: each MAE is below 0.1, and the permutations do not all give the
// same error (input scrambling changes accuracy at no hardware cost).
module tb_usc_fig6;
  import usc_pkg::*;
  import usc_tb_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] x;
  logic [5:0] z;
  int checks = 0, failures = 0;

  function automatic perm_t perm3(int w);
    case (w)
      0: return {232'(0), 8'd2, 8'd1, 8'd0};
      1: return {232'(0), 8'd1, 8'd2, 8'd0};
      2: return {232'(0), 8'd2, 8'd0, 8'd1};
      3: return {232'(0), 8'd0, 8'd2, 8'd1};
      4: return {232'(0), 8'd1, 8'd0, 8'd2};
      default: return {232'(0), 8'd0, 8'd1, 8'd2};
    endcase
  endfunction

  for (genvar w = 0; w < 6; w++) begin : g_w
    usc_top #(.D(3), .M(1), .SR2_PERM(perm_identity(1)), .SR3_PERM(perm3(w)),
              .CORE_TT(core_tt_fig6())) u_dut (
      .clk(clk), .rst_n(rst_n), .x_bin(x), .z(z[w]), .x_sn(), .y_sn());
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
    int cnt [6];
    real err [6], xv, fx, lo, hi;
    foreach (err[w]) err[w] = 0.0;
    for (int xi = 0; xi < 256; xi++) begin
      x = 8'(xi);
      rst_n = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      repeat (2) @(negedge clk);
      foreach (cnt[w]) cnt[w] = 0;
      for (int t = 0; t < 255; t++) begin
        foreach (cnt[w]) cnt[w] += int'(z[w]);
        @(negedge clk);
      end
      xv = xi / 256.0;
      fx = xv + xv * xv - xv * xv * xv;
      foreach (err[w]) err[w] += fabs(cnt[w] / 255.0 - fx);
    end
    lo = 1.0; hi = 0.0;
    foreach (err[w]) begin
      err[w] /= 256.0;
      $display("scrambling way %0d: MAE %0.4f", w + 1, err[w]);
      checks++;
      if (err[w] >= 0.1) begin failures++; $display("FAIL MAE way %0d", w + 1); end
      if (err[w] < lo) lo = err[w];
      if (err[w] > hi) hi = err[w];
    end
    checks++;
    if (hi - lo < 1e-6) begin failures++; $display("FAIL all ways give the same MAE"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
