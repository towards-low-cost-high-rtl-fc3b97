// usc_randomizer: randomizer of the improved univariate SC architecture.
//
// From one random number source (RNS) and one comparator it produces all
// the stochastic numbers (SNs) the SC core needs:
//
//   RNS -> NG1 -> SR1 -> CMP(R' < X) -> D-1 DFFs -> SR3 -> x_sn[D-1:0]
//   RNS -> BS  -> NG2 -> SR2                            -> y_sn[M-1:0]
//
// The comparator turns the negated and scrambled random number into one
// variable SN of value X/2^N; the delay chain makes D-1 delayed copies of it,
// and input scrambling SR3 decides which copy reaches which core input. Bit
// selection takes M raw RNS bits as the M independent 0.5 SNs, which are
// then negated (NG2) and permuted (SR2). Negating and scrambling cost no
// gates; they only change the order and correlation of the streams, and so
// the accuracy. With zero masks and original-order permutations this is the
// basic architecture (RNS, CMP, D-1 DFFs, bit selection).
//
// RNS_KIND chooses an LFSR or a Sobol generator. The default configuration
// is the starting point of the configuration search: bits 0..M-1 selected,
// nothing negated, every permutation in reverse order.
//
// Interface: x_bin is held for the whole stream; one bit of each SN appears
// per clock. x_sn[k] depends on the comparator output of up to D-1 cycles
// before, so the first D-1 cycles after reset include the DFF reset values.
// The structure and the default configuration follow the architecture
// description; the RNS internals and all encodings are this design's own.
module usc_randomizer
  import usc_pkg::*;
#(
  parameter int unsigned  N         = 8,
  parameter int unsigned  D         = 4,
  parameter int unsigned  M         = 6,
  parameter rns_kind_e    RNS_KIND  = RNS_LFSR,
  parameter logic [N-1:0] LFSR_TAPS = N'(lfsr_taps(N)),
  parameter logic [N-1:0] LFSR_SEED = N'(1),
  parameter dirv_t        SOBOL_DIR = sobol_dim1(N),
  parameter perm_t        BS_SEL    = perm_identity(M),
  parameter logic [N-1:0] NG1_MASK  = '0,
  parameter logic [M-1:0] NG2_MASK  = '0,
  parameter perm_t        SR1_PERM  = perm_reverse(N),
  parameter perm_t        SR2_PERM  = perm_reverse(M),
  parameter perm_t        SR3_PERM  = perm_reverse(D)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x_bin,
  output logic [D-1:0] x_sn,
  output logic [M-1:0] y_sn
);

  logic [N-1:0] r_raw;     // RNS output
  logic [N-1:0] r_ng;      // after NG1
  logic [N-1:0] r_sr;      // after SR1, compared with X
  logic         sn;        // the single generated variable SN
  logic [D-1:0] x_dly;     // sn delayed by 0..D-1 cycles
  logic [M-1:0] y_bs;      // after BS
  logic [M-1:0] y_ng;      // after NG2

  if (RNS_KIND == RNS_SOBOL) begin : g_sobol
    usc_sobol #(.N(N), .DIRV(SOBOL_DIR)) u_rns (
      .clk(clk), .rst_n(rst_n), .r(r_raw));
  end else begin : g_lfsr
    usc_lfsr #(.N(N), .TAPS(LFSR_TAPS), .SEED(LFSR_SEED)) u_rns (
      .clk(clk), .rst_n(rst_n), .r(r_raw));
  end

  // Variable SN path.
  usc_negate   #(.W(N), .MASK(NG1_MASK)) u_ng1 (.r_in(r_raw), .r_out(r_ng));
  usc_scramble #(.W(N), .PERM(SR1_PERM)) u_sr1 (.d_in(r_ng),  .d_out(r_sr));
  usc_cmp      #(.N(N))                  u_cmp (.r(r_sr), .x_bin(x_bin), .sn(sn));
  usc_delay_chain #(.D(D)) u_dly (
    .clk(clk), .rst_n(rst_n), .sn_in(sn), .sn_out(x_dly));
  usc_scramble #(.W(D), .PERM(SR3_PERM)) u_sr3 (.d_in(x_dly), .d_out(x_sn));

  // 0.5 SN path.
  usc_bitsel   #(.N(N), .M(M), .SEL(BS_SEL)) u_bs (.r_in(r_raw), .y_out(y_bs));
  usc_negate   #(.W(M), .MASK(NG2_MASK))     u_ng2 (.r_in(y_bs), .r_out(y_ng));
  usc_scramble #(.W(M), .PERM(SR2_PERM))     u_sr2 (.d_in(y_ng), .d_out(y_sn));

endmodule
