// tb_usc_sobol: self-checking test of the Sobol sequence generator.
// The expected k-th output is the XOR of the direction vectors selected by
// the bits of the Gray code k ^ (k >> 1). Checked for the default first
// dimension and for the second Sobol dimension (direction numbers
// 1,3,5,15,17,51,85,255), over two periods, including that each period of
// 256 cycles produces every 8-bit value once. Also checks the package's
// sobol_dirv() for dimensions 1 to 3 against literal direction vectors.
module tb_usc_sobol;
  import usc_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] r_a, r_b;
  int checks = 0, failures = 0;

  function automatic dirv_t dim2();
    int unsigned m [8] = '{1, 3, 5, 15, 17, 51, 85, 255};
    dirv_t v = '0;
    for (int i = 0; i < 8; i++) v[i] = MAXW'(m[i]) << (7 - i);
    return v;
  endfunction

  localparam dirv_t V2 = dim2();

  usc_sobol u_a (.clk(clk), .rst_n(rst_n), .r(r_a));
  usc_sobol #(.N(8), .DIRV(V2)) u_b (.clk(clk), .rst_n(rst_n), .r(r_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] expect_r(int k, bit second);
    logic [7:0] g = 8'(k ^ (k >> 1));
    logic [7:0] r = '0;
    for (int i = 0; i < 8; i++)
      if (g[i]) r ^= second ? V2[i][7:0] : 8'(1 << (7 - i));
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [255:0] seen_a, seen_b;
    // The package's direction-vector generator against the direction
    // numbers written out here.
    check(sobol_dirv(2, 8) == V2, "sobol_dirv(2) matches the dimension-2 direction numbers");
    check(sobol_dirv(1, 8) == sobol_dim1(8), "sobol_dirv(1) is the first dimension");
    begin
      automatic dirv_t v3 = sobol_dirv(3, 8);
      automatic int unsigned e3 [8] = '{128, 192, 96, 144, 232, 92, 142, 197};
      for (int i = 0; i < 8; i++) check(v3[i] == e3[i], $sformatf("dimension-3 V%0d = %0d", i, v3[i]));
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 2; p++) begin
      seen_a = '0; seen_b = '0;
      for (int k = 0; k < 256; k++) begin
        check(r_a == expect_r(k, 1'b0), $sformatf("dim1 k=%0d got %0d exp %0d", k, r_a, expect_r(k, 1'b0)));
        check(r_b == expect_r(k, 1'b1), $sformatf("dim2 k=%0d got %0d exp %0d", k, r_b, expect_r(k, 1'b1)));
        seen_a[r_a] = 1'b1;
        seen_b[r_b] = 1'b1;
        @(negedge clk);
      end
      check(&seen_a, "dim1 period covers all values");
      check(&seen_b, "dim2 period covers all values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
