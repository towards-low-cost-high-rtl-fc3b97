// usc_bitsel: bit selection (BS).
//
// Picks M of the N bits of the random number source to serve as the M
// mutually independent stochastic numbers of value 0.5 that the SC core
// needs: each RNS bit is 1 with probability 0.5. Output j is input SEL[j].
// It is wiring only. The default takes bits 0..M-1. Elaboration fails if
// M > N or if SEL repeats an index or names a bit that does not exist.
//
// Interface: purely combinational.
// Tapping the raw RNS ahead of NG1 follows the architecture description;
// reading "the first m bits" as bits 0..M-1 is this design's choice.
module usc_bitsel
  import usc_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter int unsigned M   = 6,
  parameter perm_t       SEL = perm_identity(M)
) (
  input  logic [N-1:0] r_in,
  output logic [M-1:0] y_out
);

  if (M > N || !is_selection(SEL, M, N)) begin : g_bad_sel
    $error("usc_bitsel: SEL must name M distinct bits of the N-bit RNS");
  end

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  for (genvar j = 0; j < M; j++) begin : g_bit
    assign y_out[j] = r_in[IW'(SEL[j])];
  end

endmodule
