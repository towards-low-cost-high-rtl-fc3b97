# One generator for every input: a low-cost stochastic circuit for univariate functions

In stochastic computing (SC) a value in [0, 1] is carried by a bit stream: the
fraction of ones is the value. A circuit that evaluates a polynomial f(x) this
way is tiny — a handful of gates — but it needs several *independent* streams
of the same value x, plus several independent streams of value 0.5, and the
circuits that make those streams (a random number source plus a comparator
per stream) usually take most of the area.

This design makes all of them from **one** random number source (RNS), **one**
comparator and **d−1 flip-flops**:

* the comparator turns the random number into one stream of value x, and a
  chain of d−1 flip-flops delays it by 1, 2, …, d−1 cycles; because each bit of
  the stream is produced independently of its neighbours, the delayed copies are
  uncorrelated with one another (d−1 flip-flops is the fewest that can give d
  such copies from one generator);
* m bits of the same random number, each 1 half of the time, are used directly
  as the m streams of value 0.5 ("bit selection");
* three kinds of free rewiring — negating RNS bits, permuting RNS bits, and
  permuting which delayed copy reaches which core input — change nothing in the
  area but change how the streams are correlated, and so the accuracy. Choosing
  them well is what makes the cheap randomizer as accurate as a conventional one.

The default size is an 8-bit RNS (n = 8), d = 4 variable streams and m = 6
streams of value 0.5, so the randomizer is one 8-bit RNS, one 8-bit
comparator and 3 flip-flops.

## Datapath

```
            +-----+      +-----+      +------------+     +--------+      +-----+
 RNS ---+-->| NG1 |----->| SR1 |----->| R' < X ?   |---->| D-1    |----->| SR3 |--> x_sn[3:0] --+
 (LFSR  |   +-----+      +-----+      | comparator |     | DFFs   |      +-----+               |   +---------+
  or    |                             +------------+     +--------+                            +-->| SC core |--> z
 Sobol) |   +----+      +-----+      +-----+                                                   |   | (truth  |
        +-->| BS |----->| NG2 |----->| SR2 |---------------------------------> y_sn[5:0] ------+   |  table) |
            +----+      +-----+      +-----+                                                       +---------+
```

| Block | Module | What it does |
|---|---|---|
| RNS | `usc_lfsr` or `usc_sobol` | n-bit random number every clock |
| NG1, NG2 (RNS negating) | `usc_negate` | invert a chosen subset of bits (in a netlist: take the flip-flop's inverted output) |
| SR1, SR2 (RNS scrambling) | `usc_scramble` | permute bits |
| SR3 (input scrambling) | `usc_scramble` | permute the d delayed copies before the core |
| BS (bit selection) | `usc_bitsel` | pick m of the n raw RNS bits as the 0.5 streams |
| CMP | `usc_cmp` | `sn = R' < X`, a stream of value X/2^n |
| DFF chain | `usc_delay_chain` | copies delayed by 0..d−1 cycles |
| SC core | `usc_sc_core` | any Boolean function of the d+m streams |
| randomizer | `usc_randomizer` | all of the above except the core |
| top | `usc_top` | randomizer + core |

Bit selection taps the RNS ahead of NG1, so NG1/SR1 and NG2/SR2 are
configured independently. With no bits negated and every permutation in
original order the circuit reduces to the plain single-generator
architecture (RNS, CMP, flip-flops, bit selection).

## The configuration, and why it decides the accuracy

Everything except X is fixed at elaboration time by parameters of `usc_top`
(types and helpers in `usc_pkg`):

| Parameter | Choice | Number of choices |
|---|---|---|
| `RNS_KIND`, `LFSR_TAPS` / `SOBOL_DIR` | RNS type and its feedback polynomial or direction vectors | as many as one offers |
| `BS_SEL` | which m of n bits | C(n, m) |
| `NG1_MASK` | negated RNS bits | 2^n |
| `NG2_MASK` | negated 0.5-stream bits | 2^m |
| `SR1_PERM` | permutation of the n bits before the comparator | n! |
| `SR2_PERM` | permutation of the m 0.5 streams | m! |
| `SR3_PERM` | permutation of the d variable streams | d! |

Permutations and selections are `perm_t` values, lists of byte-wide indices:
output i of a scrambler takes input `PERM[i]`, output j of bit selection takes
RNS bit `SEL[j]`. Helpers: `perm_identity(w)`, `perm_reverse(w)`,
`sobol_dim1(n)`, `sobol_dirv(dim, n)` (Sobol dimensions 1–8).
Elaboration fails on a list that is not a permutation or selection.

The defaults are the usual starting point of a configuration search: LFSR,
bits 0..m−1 selected, nothing negated, every permutation in reverse order.
Left like that the circuit works but is inaccurate, because the delayed copies
of one LFSR or Sobol stream are strongly correlated. The configuration
search that goes with the architecture is coordinate-wise: try all bit
selections and negations (with a random RNS choice each time), then all
permutations for SR1 and for SR2, then all input scramblings, keep whatever
lowers the mean absolute error (MAE) over all 2^n inputs, and repeat until an
iteration brings no improvement. The configurations in `tb/usc_cfg_pkg.sv`
were found with a shortened version of that search (random samples instead of
full enumeration of the large sets) on a cycle-exact model; the simulated RTL
reproduces the model's error to the millionth.

Measured with `tb_usc_funcs` (n = 8, d = 4, m = 6; MAE over X = 0..255, one
source period per X; "norm" = MAE divided by the error of the core's
polynomial alone):

| ID | f(x) | polynomial error | tuned LFSR (norm) | tuned Sobol (norm) | untuned LFSR | untuned Sobol |
|---|---|---|---|---|---|---|
| 1 | sin x | 0.0006 | 0.0037 (6.2) | 0.0044 (7.4) | 0.0239 | 0.0295 |
| 2 | cos x | 0.0023 | 0.0039 (1.7) | 0.0037 (1.7) | 0.0447 | 0.0595 |
| 3 | e^−x | 0.0020 | 0.0045 (2.3) | 0.0044 (2.2) | 0.0492 | 0.1644 |
| 4 | ln(1+x) | 0.0021 | 0.0032 (1.6) | 0.0043 (2.1) | 0.0430 | 0.0651 |
| 5 | sin(πx)/π | 0.0005 | 0.0060 (12.5) | 0.0084 (17.5) | 0.0368 | 0.1865 |
| 6 | tanh x | 0.0008 | 0.0043 (5.4) | 0.0039 (5.0) | 0.0315 | 0.0409 |
| 7 | tanh 4x | 0.0393 | 0.0088 (0.22) | 0.0045 (0.11) | 0.0861 | 0.3038 |
| 8 | x^0.45 | 0.0059 | 0.0072 (1.2) | 0.0112 (1.9) | 0.0643 | 0.1705 |
| 9 | e^−2x | 0.0021 | 0.0049 (2.4) | 0.0073 (3.5) | 0.0589 | 0.1849 |
| 10 | 1/(1+e^−x) | 0.0018 | 0.0028 (1.6) | 0.0020 (1.2) | 0.0080 | 0.0485 |
| 11 | x^2.2 | 0.0006 | 0.0050 (8.7) | 0.0054 (9.3) | 0.0443 | 0.1741 |
| 12 | 0.5cos(πx)+0.5 | 0.0058 | 0.0052 (0.90) | 0.0047 (0.82) | 0.0375 | 0.0612 |

Tuning cuts the error by 5–30×. Where the polynomial is a poor fit (tanh 4x,
0.5cos(πx)+0.5) the stream error can partly cancel the approximation error,
so the circuit beats its own polynomial. These numbers belong to this
design's cores (next section), so they are not comparable one-to-one with
figures for other cores.

`tb_usc_fig6` shows input scrambling on the example f(x) = x + x² − x³
(core `a | (b & c)`, three copies of one 8-bit LFSR stream): the six
permutations give MAE 0.0201, 0.0201, 0.0338, 0.0338, 0.0201, 0.0201.

## The SC core

`usc_sc_core` is a 2^(d+m)-entry truth table indexed by `{x_sn, y_sn}`. For
independent inputs its output probability is a polynomial in x with
coefficients that are multiples of 1/2^m, so any combinational core produced
by an SC synthesis method drops in as a `CORE_TT` value.

The cores shipped here are this design's own: degree-4 Bernstein
polynomials f(x) ≈ Σ b_k·C(4,k)·x^k·(1−x)^(4−k), with b_k the least-squares fit
of the target over [0, 1], clipped to [0, 1] and rounded to multiples of 1/64
(`func_coef(id)` in `usc_pkg`, IDs as in the table above). `core_tt()`
realises them as z = 1 when the 6-bit number formed by the 0.5 streams is
below 64·b_k, k being how many variable streams are 1. The default `CORE_TT`
is the sin x core. Because these cores depend only on the count of ones,
input scrambling (SR3) has no effect on them; it matters for asymmetric cores
such as the x + x² − x³ example (`core_tt_fig6()`).

## Interface and timing

`usc_top` ports: `clk`, `rst_n` (asynchronous, active low), `x_bin[N-1:0]`,
`z`, and, for observation, `x_sn[D-1:0]` and `y_sn[M-1:0]` (the streams
entering the core).

* Hold `x_bin` for a whole stream. Reset loads the LFSR seed (or clears the
  Sobol counter and register) and clears the flip-flops.
* One bit of z per clock, from the first cycle after reset; z is
  combinational from the RNS and flip-flop state and `x_bin`.
* The first d−1 = 3 cycles after reset include the flip-flops' reset zeros.
  The testbenches skip them and then count the ones of z over one source
  period: 255 cycles for the 8-bit LFSR (it never produces 0), 256 for Sobol.
  f(x) ≈ count / period, with x = X/256.
* Turning the count into a binary number is left to the user; the
  architecture ends at the stream z.

Sources: `usc_lfsr` is a Fibonacci LFSR shifting towards the MSB, feedback =
XOR of the bits in `TAPS` (default `lfsr_taps(N)`, a maximal-length choice
for widths 3 to 16; 0xB8, x^8+x^6+x^5+x^4+1, for N = 8; seed 1).
N = 6 and 7 work with the same d = 4, m = 6 cores (m ≤ n is required);
`tb_usc_widths` runs them.
`usc_sobol` is the Gray-code Sobol recurrence: a counter's least significant
zero bit picks the direction vector XORed into the output register.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/usc_pkg.sv tb/usc_tb_pkg.sv \
    tb/tb_usc_top.sv --top-module tb_usc_top && obj_dir/Vtb_usc_top
```

`tb_usc_funcs` also needs `tb/usc_cfg_pkg.sv` after `rtl/usc_pkg.sv`; unit
testbenches need only `rtl/usc_pkg.sv`.

| Testbench | Covers |
|---|---|
| `tb_usc_lfsr`, `tb_usc_sobol`, `tb_usc_negate`, `tb_usc_scramble`, `tb_usc_bitsel`, `tb_usc_cmp`, `tb_usc_delay_chain`, `tb_usc_sc_core`, `tb_usc_randomizer` | each block against an independent model |
| `tb_usc_top` | three configurations (default LFSR; Sobol with every negation and scrambler active; plain single-generator form), all 256 inputs, every output bit checked, each mechanism counted |
| `tb_usc_top_full` | the top at default parameters, all 256 inputs |
| `tb_usc_funcs` | the twelve functions, tuned and untuned, LFSR and Sobol |
| `tb_usc_fig6` | input scrambling on x + x² − x³ |
| `tb_usc_widths` | 6-bit and 7-bit sources (LFSR and Sobol), all inputs |
| `tb_usc_square` | d = 2: x² from one Sobol generator, one flip-flop and an AND gate (MAE 0.0225) |

All run in well under a second.

## What follows the original description and what does not

Taken from the architecture's description: the structure above (one RNS, one
comparator, d−1 flip-flops, bit selection feeding the 0.5 streams, NG1→SR1
before the comparator, BS→NG2→SR2, SR3 before the core), the sizes n = 8,
d = 4, m = 6, LFSR and Sobol as the two RNS types, the meaning of the
configuration choices, the starting configuration and the search procedure.

This design's own choices:

* LFSR form, default polynomial and seed; Sobol generator internals and the
  direction-number table;
* comparator direction `R' < X`, giving value X/2^n;
* encodings: bit i of a negation mask negates bit i; "the first m bits" means
  bits 0..m−1; permutation output i takes input `PERM[i]`;
* flip-flops reset to 0;
* the SC cores (Bernstein fits rather than cores from a dedicated SC
  synthesis tool) and therefore all accuracy numbers;
* configuration by parameters, so a different function or configuration means
  a re-elaboration — which matches a circuit whose rewiring is free only
  because it is fixed at design time.

Not included: the configuration search itself (software; its results are in
`tb/usc_cfg_pkg.sv`), the conventional and scrambling-based randomizers it is
usually compared with, and the DCT image experiment. In that experiment only cos(πx) is evaluated
stochastically; cos(πx) = 2·g(x) − 1 with g(x) = 0.5cos(πx)+0.5, function 12
above, and the transform itself is ordinary arithmetic outside this circuit.
