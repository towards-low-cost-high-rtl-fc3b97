// tb_usc_delay_chain: self-checking test of the D-1 flip-flop delay chain
// (D = 4 and D = 2). A random bit stream is kept in a history array; every
// cycle sn_out[k] must equal the input of k cycles earlier, or 0 before k
// cycles have passed since reset.
module tb_usc_delay_chain;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sn;
  logic [3:0] out4;
  logic [1:0] out2;
  int checks = 0, failures = 0;

  usc_delay_chain          u_a (.clk(clk), .rst_n(rst_n), .sn_in(sn), .sn_out(out4));
  usc_delay_chain #(.D(2)) u_b (.clk(clk), .rst_n(rst_n), .sn_in(sn), .sn_out(out2));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hist [$];
    bit e;
    sn = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      sn = 1'($urandom);
      hist.push_front(sn);
      #1;
      for (int k = 0; k < 4; k++) begin
        e = (k < hist.size()) ? hist[k] : 1'b0;
        checks++;
        if (out4[k] != e) begin failures++; $display("FAIL t=%0d k=%0d", t, k); end
        if (k < 2) begin
          checks++;
          if (out2[k] != e) begin failures++; $display("FAIL D=2 t=%0d k=%0d", t, k); end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
