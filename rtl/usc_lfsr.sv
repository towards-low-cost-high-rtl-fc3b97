// usc_lfsr: n-bit random number source (RNS) built as a Fibonacci linear
// feedback shift register.
//
// Every clock the register shifts one place towards its MSB and the new LSB
// is the XOR of the state bits selected by TAPS. The feedback polynomial
// (TAPS) and the starting state (SEED) form one RNS configuration; the
// configuration search may pick among several. The default taps
// (usc_pkg::lfsr_taps, widths 3 to 16) give a maximal-length sequence: for
// N = 8, period 255, visiting every non-zero 8-bit value once. An all-zero
// SEED would lock the register at zero.
//
// Interface: r is the register itself and changes on every rising clock
// edge; rst_n (asynchronous, active low) loads SEED.
// The choice of LFSR as one RNS type follows the architecture description;
// the Fibonacci form, the default polynomials (x^8+x^6+x^5+x^4+1 for N = 8)
// and seed 1 are this design's own.
module usc_lfsr
  import usc_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter logic [N-1:0] TAPS = N'(lfsr_taps(N)),
  parameter logic [N-1:0] SEED = N'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [N-1:0] r
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r <= SEED;
    else        r <= {r[N-2:0], ^(r & TAPS)};
  end

  initial begin
    if (SEED == '0) $error("usc_lfsr: SEED must be non-zero");
    if (TAPS == '0) $error("usc_lfsr: no default TAPS for this N, give TAPS");
  end

endmodule
