// usc_scramble: scrambling (SR), a fixed permutation of W signals.
//
// Output i is input PERM[i]. The same block serves three roles in the
// architecture: RNS scrambling of the N RNS bits before the comparator
// (SR1), of the M bits that become 0.5 SNs (SR2), and input scrambling of
// the D variable SNs before the SC core (SR3). It is wiring only, so it adds
// no area; its effect is on the correlation between the stochastic numbers.
// The default is the reverse order, output i = input W-1-i, the starting
// point of the configuration search. Elaboration fails if PERM is not a
// permutation of 0..W-1.
//
// Interface: purely combinational.
// The three roles and the reverse-order default follow the architecture
// description; the index-list encoding of a permutation is this design's own.
module usc_scramble
  import usc_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter perm_t       PERM = perm_reverse(W)
) (
  input  logic [W-1:0] d_in,
  output logic [W-1:0] d_out
);

  if (!is_perm(PERM, W)) begin : g_bad_perm
    $error("usc_scramble: PERM is not a permutation of 0..W-1");
  end

  localparam int unsigned IW = (W > 1) ? $clog2(W) : 1;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign d_out[i] = d_in[IW'(PERM[i])];
  end

endmodule
