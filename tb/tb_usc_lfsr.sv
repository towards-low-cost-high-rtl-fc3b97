// tb_usc_lfsr: self-checking test of the LFSR random number source.
// Checks, for the default x^8+x^6+x^5+x^4+1 register, the value after reset,
// every next state against the recurrence written out bit by bit, and that
// one period of 255 cycles visits each non-zero value once; then the same
// period property for a second polynomial (taps 0x8E) and another seed.
module tb_usc_lfsr;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] r_a, r_b;
  int checks = 0, failures = 0;

  usc_lfsr u_a (.clk(clk), .rst_n(rst_n), .r(r_a));
  usc_lfsr #(.N(8), .TAPS(8'h8E), .SEED(8'h5A)) u_b (.clk(clk), .rst_n(rst_n), .r(r_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [255:0] seen_a, seen_b;
    logic [7:0] prev, exp_next;
    int first_repeat;
    seen_a = '0; seen_b = '0;
    repeat (2) @(negedge clk);
    check(r_a == 8'h01, "seed of default LFSR");
    check(r_b == 8'h5A, "seed of second LFSR");
    rst_n = 1'b1;
    first_repeat = -1;
    for (int t = 0; t < 255; t++) begin
      check(r_a != 8'h00 && !seen_a[r_a], $sformatf("value %0d repeats in period (a)", r_a));
      check(r_b != 8'h00 && !seen_b[r_b], $sformatf("value %0d repeats in period (b)", r_b));
      seen_a[r_a] = 1'b1;
      seen_b[r_b] = 1'b1;
      prev = r_a;
      exp_next = {prev[6:0], prev[7] ^ prev[5] ^ prev[4] ^ prev[3]};
      @(negedge clk);
      check(r_a == exp_next, $sformatf("next state of %02h: got %02h exp %02h", prev, r_a, exp_next));
    end
    check(r_a == 8'h01, "period of default LFSR is 255");
    check(r_b == 8'h5A, "period of second LFSR is 255");
    check($countones(seen_a) == 255, "default LFSR visits all non-zero values");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
