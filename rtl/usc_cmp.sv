// usc_cmp: comparator (CMP) of the stochastic number generator.
//
// Produces one bit of the variable stochastic number: sn = 1 when the random
// number r is below the binary input x_bin. With r uniform over 0..2^N-1
// the stream of sn bits has value x_bin / 2^N.
//
// Interface: purely combinational; N-bit unsigned inputs.
// The comparator follows the architecture description; the direction
// (R < X rather than R <= X) is this design's choice.
module usc_cmp #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] r,
  input  logic [N-1:0] x_bin,
  output logic         sn
);

  assign sn = (r < x_bin);

endmodule
