// tb_usc_bitsel: self-checking test of bit selection. The default selects
// RNS bits 0..5; a second instance selects bits {7,1,4,2,0,6}. Random
// inputs, expected outputs built from the index lists.
module tb_usc_bitsel;
  import usc_pkg::*;
  logic [7:0] r;
  logic [5:0] y_a, y_b;
  int checks = 0, failures = 0;

  localparam perm_t SEL_B = {208'(0), 8'd6, 8'd0, 8'd2, 8'd4, 8'd1, 8'd7};

  usc_bitsel                              u_a (.r_in(r), .y_out(y_a));
  usc_bitsel #(.N(8), .M(6), .SEL(SEL_B)) u_b (.r_in(r), .y_out(y_b));

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int sel [6] = '{7, 1, 4, 2, 0, 6};
    logic [5:0] eb;
    for (int t = 0; t < 256; t++) begin
      r = 8'(t); #1;
      for (int j = 0; j < 6; j++) eb[j] = r[sel[j]];
      checks++; if (y_a != r[5:0]) begin failures++; $display("FAIL a r=%h y=%h", r, y_a); end
      checks++; if (y_b != eb)     begin failures++; $display("FAIL b r=%h y=%h", r, y_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
