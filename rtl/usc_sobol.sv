// usc_sobol: n-bit random number source (RNS) built as a Sobol sequence
// generator (SSG).
//
// It uses the Gray-code form of the Sobol recurrence: an N-bit counter k
// counts clock cycles, and on each clock the output register is XORed with
// the direction vector V_c, where c is the position of the least significant
// zero bit of k (the bit that changes in the Gray code of k). When k is all
// ones, c = N-1, which returns the sequence to 0 after 2^N cycles. Over one
// period of 2^N cycles every N-bit value appears once, spread with low
// discrepancy.
//
// The direction vectors (DIRV) are the RNS configuration. The default is the
// first Sobol dimension, V_i = 2^(N-1-i).
//
// Interface: r is valid from reset (first value 0) and advances on every
// rising clock edge; rst_n is asynchronous, active low.
// Using an SSG as the RNS follows the architecture description; its
// internal form is the standard Sobol recurrence, chosen here.
module usc_sobol
  import usc_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter dirv_t       DIRV = sobol_dim1(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [N-1:0] r
);

  logic [N-1:0]         cnt;
  logic [$clog2(N)-1:0] lsz;

  // Position of the least significant zero of the counter.
  always_comb begin
    lsz = $clog2(N)'(N - 1);
    for (int i = N - 1; i >= 0; i--) begin
      if (!cnt[i]) lsz = $clog2(N)'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      r   <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      r   <= r ^ DIRV[lsz][N-1:0];
    end
  end

endmodule
