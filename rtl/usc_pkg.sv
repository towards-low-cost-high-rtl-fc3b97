// usc_pkg: types and constant functions shared by the univariate stochastic
// computing (SC) architecture.
//
// The architecture is configured entirely at elaboration time. A
// configuration names one choice per module:
//   RNS  - LFSR feedback taps and seed, or Sobol direction vectors
//   BS   - which M of the N RNS bits become the 0.5 SNs      (perm_t)
//   NG1  - which of the N RNS bits are negated                (bit mask)
//   NG2  - which of the M selected bits are negated           (bit mask)
//   SR1  - permutation of the N RNS bits                      (perm_t)
//   SR2  - permutation of the M selected bits                 (perm_t)
//   SR3  - permutation of the D variable SNs (input scrambling)(perm_t)
// Permutations and selections are stored as packed arrays of MAXW byte-wide
// indices; a module of width W uses entries 0..W-1 only. Output i of a
// scrambler takes input PERM[i].
//
// Default choices follow the starting point of the design space exploration:
// selection of bits 0..M-1, no negation, reverse-order permutations.
//
// The package also holds this design's own SC cores for twelve target
// functions: degree-4 Bernstein polynomials whose coefficients b_k (in units
// of 1/2^6) come from a least-squares fit of the function over [0,1],
// clipped to [0,1]. core_tt() turns such coefficients into the truth table
// of a combinational core: z = 1 when the M-bit number formed by the 0.5 SNs
// is below b_k, where k is the number of ones among the D variable SNs.
package usc_pkg;

  localparam int unsigned MAXW = 32;

  typedef logic [MAXW-1:0][7:0]      perm_t;   // index list (permutation or selection)
  typedef logic [MAXW-1:0][MAXW-1:0] dirv_t;   // Sobol direction vectors

  typedef enum logic [0:0] {
    RNS_LFSR  = 1'b0,
    RNS_SOBOL = 1'b1
  } rns_kind_e;

  // Reverse-order permutation of w bits (R_1): output i takes input w-1-i.
  function automatic perm_t perm_reverse(int unsigned w);
    perm_t p = '0;
    for (int unsigned i = 0; i < w; i++) p[i] = 8'(w - 1 - i);
    return p;
  endfunction

  // Original-order permutation of w bits: output i takes input i. Also the
  // selection of the first w bits (B_1).
  function automatic perm_t perm_identity(int unsigned w);
    perm_t p = '0;
    for (int unsigned i = 0; i < w; i++) p[i] = 8'(i);
    return p;
  endfunction

  // True when entries 0..w-1 of p are a permutation of 0..w-1.
  function automatic bit is_perm(perm_t p, int unsigned w);
    logic [MAXW-1:0] seen = '0;
    for (int unsigned i = 0; i < w; i++) begin
      if (int'(p[i]) >= int'(w)) return 1'b0;
      if (seen[5'(p[i])]) return 1'b0;
      seen[5'(p[i])] = 1'b1;
    end
    return 1'b1;
  endfunction

  // True when entries 0..m-1 of s are distinct indices below n.
  function automatic bit is_selection(perm_t s, int unsigned m, int unsigned n);
    logic [MAXW-1:0] seen = '0;
    for (int unsigned i = 0; i < m; i++) begin
      if (int'(s[i]) >= int'(n)) return 1'b0;
      if (seen[5'(s[i])]) return 1'b0;
      seen[5'(s[i])] = 1'b1;
    end
    return 1'b1;
  endfunction

  // Default LFSR feedback taps for an n-bit register (n = 3..16), in the
  // form used by usc_lfsr (shift towards the MSB, new LSB = XOR of the state
  // bits whose TAPS bit is set). Each gives a maximal-length sequence of
  // period 2^n - 1. For n = 8 it is 0xB8 (x^8+x^6+x^5+x^4+1). Returns 0 for
  // widths with no entry.
  function automatic logic [MAXW-1:0] lfsr_taps(int unsigned n);
    case (n)
      3:  return 32'h0005;
      4:  return 32'h0009;
      5:  return 32'h0012;
      6:  return 32'h0021;
      7:  return 32'h0041;
      8:  return 32'h00B8;
      9:  return 32'h0108;
      10: return 32'h0204;
      11: return 32'h0402;
      12: return 32'h0829;
      13: return 32'h100D;
      14: return 32'h2015;
      15: return 32'h4001;
      16: return 32'h8016;
      default: return '0;
    endcase
  endfunction

  // First dimension of the Sobol sequence for an n-bit generator:
  // V_i = 2^(n-1-i) (the van der Corput sequence).
  function automatic dirv_t sobol_dim1(int unsigned n);
    dirv_t v = '0;
    for (int unsigned i = 0; i < n; i++) v[i] = MAXW'(1) << (n - 1 - i);
    return v;
  endfunction

  // Direction vectors of Sobol dimension dim (1..8) for an n-bit generator.
  // Dimension 1 is the van der Corput sequence; dimensions 2..8 use the
  // primitive polynomials and initial direction numbers (degree s,
  // coefficient bits a, m_1..m_s) of the widely used Joe-Kuo table, extended
  // by the recurrence m_i = 2 a_1 m_(i-1) ^ ... ^ 2^(s-1) a_(s-1) m_(i-s+1)
  // ^ 2^s m_(i-s) ^ m_(i-s); then V_i = m_(i+1) * 2^(n-1-i).
  function automatic dirv_t sobol_dirv(int unsigned dim, int unsigned n);
    int unsigned s, a;
    int unsigned m [MAXW];
    dirv_t v = '0;
    foreach (m[i]) m[i] = 0;
    case (dim)
      2: begin s = 1; a = 0; m[0] = 1; end
      3: begin s = 2; a = 1; m[0] = 1; m[1] = 3; end
      4: begin s = 3; a = 1; m[0] = 1; m[1] = 3; m[2] = 1; end
      5: begin s = 3; a = 2; m[0] = 1; m[1] = 1; m[2] = 1; end
      6: begin s = 4; a = 1; m[0] = 1; m[1] = 1; m[2] = 3; m[3] = 3; end
      7: begin s = 4; a = 4; m[0] = 1; m[1] = 3; m[2] = 5; m[3] = 13; end
      8: begin s = 5; a = 2; m[0] = 1; m[1] = 1; m[2] = 5; m[3] = 5; m[4] = 17; end
      default: return sobol_dim1(n);
    endcase
    for (int unsigned i = s; i < n; i++) begin
      m[i] = m[i-s] ^ (m[i-s] << s);
      for (int unsigned k = 1; k < s; k++)
        if (((a >> (s - 1 - k)) & 1) != 0) m[i] ^= m[i-k] << k;
    end
    for (int unsigned i = 0; i < n; i++) v[i] = MAXW'(m[i] << (n - 1 - i));
    return v;
  endfunction

  // ---------------------------------------------------------------------
  // SC cores for the twelve target functions (D = 4, M = 6).
  // ---------------------------------------------------------------------
  localparam int unsigned CORE_D = 4;
  localparam int unsigned CORE_M = 6;

  typedef logic [CORE_D:0][7:0] bcoef_t;   // b_0..b_4, each 0..64

  // Function IDs 1..12: 1 sin(x), 2 cos(x), 3 exp(-x), 4 log(1+x), 5 sin(pi x)/pi,
  // 6 tanh(x), 7 tanh(4x), 8 x^0.45, 9 exp(-2x), 10 1/(1+exp(-x)),
  // 11 x^2.2, 12 0.5 cos(pi x) + 0.5.
  function automatic bcoef_t func_coef(int unsigned id);
    case (id)
      1:  return {8'd54, 8'd45, 8'd32, 8'd16, 8'd0};
      2:  return {8'd35, 8'd48, 8'd59, 8'd64, 8'd64};
      3:  return {8'd24, 8'd29, 8'd37, 8'd48, 8'd64};
      4:  return {8'd44, 8'd36, 8'd27, 8'd16, 8'd0};
      5:  return {8'd0,  8'd16, 8'd33, 8'd16, 8'd0};
      6:  return {8'd49, 8'd42, 8'd32, 8'd16, 8'd0};
      7:  return {8'd64, 8'd64, 8'd60, 8'd64, 8'd0};
      8:  return {8'd63, 8'd61, 8'd39, 8'd49, 8'd8};
      9:  return {8'd9,  8'd13, 8'd21, 8'd32, 8'd64};
      10: return {8'd47, 8'd44, 8'd40, 8'd36, 8'd32};
      11: return {8'd64, 8'd29, 8'd7,  8'd0,  8'd0};
      12: return {8'd0,  8'd0,  8'd32, 8'd64, 8'd64};
      default: return '0;
    endcase
  endfunction

  // Truth table of a core for D variable SNs and M 0.5 SNs. Entry index is
  // {x_sn, y_sn}: the D variable SNs in the high bits, the M 0.5 SNs low.
  function automatic logic [2**(CORE_D+CORE_M)-1:0] core_tt(bcoef_t b);
    logic [2**(CORE_D+CORE_M)-1:0] tt = '0;
    for (int unsigned a = 0; a < 2**(CORE_D+CORE_M); a++) begin
      logic [CORE_D-1:0] xs;
      int unsigned       ys;
      xs    = CORE_D'(a >> CORE_M);
      ys    = a % (2**CORE_M);
      tt[a] = (ys < int'(b[$countones(xs)]));
    end
    return tt;
  endfunction

  // Truth table of the three-input example core f(x) = x + x^2 - x^3
  // (variable SNs a, b, c): z = a | (b & c), so P(z) = x + x^2 - x^3.
  // Built for D = 3 variable SNs and one unused 0.5 SN.
  function automatic logic [15:0] core_tt_fig6();
    logic [15:0] tt = '0;
    for (int unsigned a = 0; a < 16; a++) begin
      logic [2:0] xs;
      xs    = 3'(a >> 1);
      tt[a] = xs[0] | (xs[1] & xs[2]);
    end
    return tt;
  endfunction

endpackage
