// usc_top: improved univariate stochastic computing (SC) architecture.
//
// Computes z = f(x) for a univariate function f in the stochastic domain: the
// binary input X (N bits) stands for x = X/2^N, and the output is a bit
// stream z whose fraction of ones approximates f(x). The randomizer needs a
// single random number source, a single comparator and D-1 flip-flops to
// provide the D variable SNs and the M SNs of value 0.5 that the
// combinational SC core consumes. Bit selection, RNS negating and the three
// scramblers are wiring or complemented flip-flop outputs and set the
// accuracy without adding area.
//
// Defaults: N = 8, D = 4, M = 6, LFSR source, the configuration search's
// starting point (bits 0..5 selected, nothing negated, reverse-order
// permutations) and this design's degree-4 Bernstein core for sin(x). Every
// choice is a parameter, so a configuration found for another function is
// loaded by overriding parameters only.
//
// Interface and timing: hold x_bin, release rst_n, and count the ones of z
// over a stream of L cycles (L = 2^N for a Sobol source, 2^N-1 for an LFSR);
// the estimate of f(x) is count/L. z is combinational from the RNS, the
// flip-flops and x_bin, so the first bit appears in the cycle after reset
// ends. x_sn and y_sn show the SNs entering the core.
// The structure, the sizes and the default configuration follow the
// architecture description; the sin(x) core, the observation ports and the
// reading of the result by counting are this design's own.
module usc_top
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
  parameter perm_t        SR3_PERM  = perm_reverse(D),
  parameter logic [2**(D+M)-1:0] CORE_TT = (2**(D+M))'(core_tt(func_coef(1)))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x_bin,
  output logic         z,
  output logic [D-1:0] x_sn,
  output logic [M-1:0] y_sn
);

  usc_randomizer #(
    .N(N), .D(D), .M(M), .RNS_KIND(RNS_KIND),
    .LFSR_TAPS(LFSR_TAPS), .LFSR_SEED(LFSR_SEED), .SOBOL_DIR(SOBOL_DIR),
    .BS_SEL(BS_SEL), .NG1_MASK(NG1_MASK), .NG2_MASK(NG2_MASK),
    .SR1_PERM(SR1_PERM), .SR2_PERM(SR2_PERM), .SR3_PERM(SR3_PERM)
  ) u_rand (
    .clk(clk), .rst_n(rst_n), .x_bin(x_bin), .x_sn(x_sn), .y_sn(y_sn));

  usc_sc_core #(.D(D), .M(M), .TT(CORE_TT)) u_core (
    .x_sn(x_sn), .y_sn(y_sn), .z(z));

endmodule
