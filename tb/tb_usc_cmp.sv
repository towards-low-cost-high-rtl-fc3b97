// tb_usc_cmp: exhaustive test of the 8-bit comparator, and of the value of
// the resulting stochastic number: over all 256 random numbers, the number
// of ones equals X.
module tb_usc_cmp;
  logic [7:0] r, x;
  logic sn;
  int checks = 0, failures = 0;

  usc_cmp u_dut (.r(r), .x_bin(x), .sn(sn));

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    for (int xi = 0; xi < 256; xi++) begin
      ones = 0;
      for (int ri = 0; ri < 256; ri++) begin
        x = 8'(xi); r = 8'(ri); #1;
        checks++;
        if (sn != (ri < xi)) begin
          failures++;
          $display("FAIL r=%0d x=%0d sn=%b", ri, xi, sn);
        end
        ones += int'(sn);
      end
      checks++;
      if (ones != xi) begin failures++; $display("FAIL ones %0d for X=%0d", ones, xi); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
