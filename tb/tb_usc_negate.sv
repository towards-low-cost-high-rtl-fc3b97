// tb_usc_negate: self-checking test of RNS negating. Random inputs through
// an 8-bit negator with mask 0xA5, a 6-bit negator with the default mask
// (nothing negated) and an 8-bit negator that negates every bit; the
// expected output is built bit by bit.
module tb_usc_negate;
  logic [7:0] in8, out_a, out_c;
  logic [5:0] in6, out_b;
  int checks = 0, failures = 0;

  usc_negate #(.W(8), .MASK(8'hA5)) u_a (.r_in(in8), .r_out(out_a));
  usc_negate #(.W(6))               u_b (.r_in(in6), .r_out(out_b));
  usc_negate #(.W(8), .MASK(8'hFF)) u_c (.r_in(in8), .r_out(out_c));

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] mask, exp8;
    mask = 8'b1010_0101;
    for (int t = 0; t < 300; t++) begin
      in8 = 8'($urandom);
      in6 = 6'($urandom);
      #1;
      for (int i = 0; i < 8; i++) exp8[i] = mask[i] ? !in8[i] : in8[i];
      checks++; if (out_a !== exp8) begin failures++; $display("FAIL a %h %h", in8, out_a); end
      checks++; if (out_b !== in6)  begin failures++; $display("FAIL b %h %h", in6, out_b); end
      checks++; if (out_c !== ~in8) begin failures++; $display("FAIL c %h %h", in8, out_c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
