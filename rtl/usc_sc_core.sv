// usc_sc_core: the SC core, a combinational circuit that computes the output
// stochastic number z from D variable SNs (each of value x) and M SNs of
// value 0.5.
//
// The core is any Boolean function of its D+M inputs, given by the truth
// table TT, indexed by {x_sn, y_sn}. For independent inputs the probability
// of z = 1 is a polynomial in x whose coefficients are multiples of 1/2^M,
// so loading a different table implements a different univariate function.
// The default table is this design's own degree-4 Bernstein core for
// sin(x): z = 1 when the M-bit number formed by y_sn is below b_k, where k
// is the number of ones in x_sn and b_k is the quantised Bernstein
// coefficient (see usc_pkg). Tables built by any other core synthesis method
// drop in unchanged.
//
// Interface: purely combinational; TT must have 2^(D+M) entries.
// A combinational core over D variable and M half-valued SNs follows the
// architecture description; the truth-table form and the Bernstein cores are
// this design's own.
module usc_sc_core
  import usc_pkg::*;
#(
  parameter int unsigned D = 4,
  parameter int unsigned M = 6,
  parameter logic [2**(D+M)-1:0] TT = (2**(D+M))'(core_tt(func_coef(1)))
) (
  input  logic [D-1:0] x_sn,
  input  logic [M-1:0] y_sn,
  output logic         z
);

  assign z = TT[{x_sn, y_sn}];

endmodule
