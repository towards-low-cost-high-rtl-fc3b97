// usc_delay_chain: the D-1 D flip-flops that turn one variable stochastic
// number into D mutually uncorrelated copies of the same value.
//
// sn_out[0] is the input itself; sn_out[k] is the input delayed by k clock
// cycles, for k = 1..D-1. Because each bit of the input stream is generated
// independently of the others, copies shifted by different amounts are
// uncorrelated. D-1 flip-flops is the minimum number that gives D such
// copies from a single generator. The flip-flops clear to 0 on reset.
//
// Interface: rst_n asynchronous, active low; sn_out[k] lags sn_in by k
// cycles.
// The chain follows the architecture description; the reset value is this
// design's choice.
module usc_delay_chain #(
  parameter int unsigned D = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sn_in,
  output logic [D-1:0] sn_out
);

  assign sn_out[0] = sn_in;

  for (genvar k = 1; k < D; k++) begin : g_dff
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sn_out[k] <= 1'b0;
      else        sn_out[k] <= sn_out[k-1];
    end
  end

endmodule
