// tb_usc_scramble: self-checking test of the scrambler. Walks a single one
// through every input of three scramblers (8-bit default reverse order,
// 4-bit permutation {2,0,3,1}, 6-bit original order) and checks where it
// appears, then compares random words against the expected reordering.
module tb_usc_scramble;
  import usc_pkg::*;
  logic [7:0] in8, out8;
  logic [3:0] in4, out4;
  logic [5:0] in6, out6;
  int checks = 0, failures = 0;

  localparam perm_t P4 = {224'(0), 8'd1, 8'd3, 8'd0, 8'd2};   // out[i] = in[P4[i]]

  usc_scramble                        u_a (.d_in(in8), .d_out(out8));
  usc_scramble #(.W(4), .PERM(P4))    u_b (.d_in(in4), .d_out(out4));
  usc_scramble #(.W(6), .PERM(perm_identity(6))) u_c (.d_in(in6), .d_out(out6));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int p4 [4] = '{2, 0, 3, 1};
    logic [3:0] e4;
    for (int i = 0; i < 8; i++) begin
      in8 = 8'(1) << i; #1;
      check(out8 == (8'(1) << (7 - i)), $sformatf("reverse: bit %0d -> %b", i, out8));
    end
    for (int t = 0; t < 200; t++) begin
      in8 = 8'($urandom); in4 = 4'($urandom); in6 = 6'($urandom); #1;
      for (int i = 0; i < 4; i++) e4[i] = in4[p4[i]];
      check(out8 == {<<{in8}}, "reverse random word");
      check(out4 == e4, $sformatf("perm4 %b -> %b exp %b", in4, out4, e4));
      check(out6 == in6, "identity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
