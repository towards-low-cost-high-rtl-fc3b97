// usc_negate: RNS negating (NG).
//
// Inverts the bits of a random binary number selected by MASK and passes the
// rest unchanged. Negating RNS bits changes the order in which the RNS
// produces its numbers, and so the order of the bits of the stochastic
// numbers derived from them, which can improve accuracy. It costs no logic
// in a real netlist: the RNS flip-flops already provide complemented
// outputs. MASK bit i set means bit i is negated; the default negates
// nothing (the starting point of the configuration search).
//
// Interface: purely combinational, W bits in, W bits out.
// The function and its role follow the architecture description; the mask
// encoding (bit i negates bit i) is this design's own.
module usc_negate #(
  parameter int unsigned  W    = 8,
  parameter logic [W-1:0] MASK = '0
) (
  input  logic [W-1:0] r_in,
  output logic [W-1:0] r_out
);

  assign r_out = r_in ^ MASK;

endmodule
