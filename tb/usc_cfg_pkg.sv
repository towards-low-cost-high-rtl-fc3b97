// usc_cfg_pkg: tuned configurations of the architecture for the twelve
// target functions, one per function and source type (LFSR or Sobol), for
// N = 8, D = 4, M = 6 and the Bernstein cores of usc_pkg.
//
// Each configuration was found by the coordinate-wise configuration search
// (bit selection and both negations first, then the two RNS scramblers, then
// input scrambling, repeated while the error improves), shortened by
// sampling random choices instead of enumerating the larger choice sets.
// The error measure is the mean absolute error over all 256 inputs of the
// count of ones of z over one source period, evaluated on a cycle-exact
// model of the circuit; mae_ppm is that model's error in millionths, which
// the simulated circuit must reproduce.
//
// For an LFSR configuration rns holds the feedback taps; for a Sobol
// configuration it holds the dimension (1..8) passed to sobol_dirv().
// Input scrambling has no effect on these cores, whose output depends only
// on how many variable SNs are 1, so sr3 stays at its first choice.
package usc_cfg_pkg;
  import usc_pkg::*;

  typedef struct packed {
    logic [7:0]  rns;
    perm_t       bs;
    logic [7:0]  ng1;
    logic [5:0]  ng2;
    perm_t       sr1;
    perm_t       sr2;
    perm_t       sr3;
    int unsigned mae_ppm;
  } cfg_t;

  function automatic cfg_t mk(logic [7:0] rns, logic [47:0] bs, logic [7:0] ng1, logic [5:0] ng2,
                              logic [63:0] sr1, logic [47:0] sr2, logic [31:0] sr3,
                              int unsigned mae_ppm);
    cfg_t c;
    c.rns = rns; c.ng1 = ng1; c.ng2 = ng2; c.mae_ppm = mae_ppm;
    c.bs  = perm_t'(bs);
    c.sr1 = perm_t'(sr1);
    c.sr2 = perm_t'(sr2);
    c.sr3 = perm_t'(sr3);
    return c;
  endfunction

  function automatic cfg_t tuned(rns_kind_e kind, int unsigned id);
    if (kind == RNS_LFSR) begin
      case (id)
         1: return mk(8'hD4, {8'd6, 8'd5, 8'd4, 8'd3, 8'd1, 8'd0}, 8'hB0, 6'h21,
                   {8'd0, 8'd1, 8'd2, 8'd3, 8'd4, 8'd5, 8'd6, 8'd7},
                   {8'd0, 8'd1, 8'd2, 8'd3, 8'd4, 8'd5}, {8'd0, 8'd1, 8'd2, 8'd3}, 3734);
         2: return mk(8'h8E, {8'd7, 8'd5, 8'd4, 8'd2, 8'd1, 8'd0}, 8'hD2, 6'h32,
                   {8'd4, 8'd6, 8'd5, 8'd7, 8'd3, 8'd0, 8'd1, 8'd2},
                   {8'd2, 8'd0, 8'd4, 8'd3, 8'd1, 8'd5}, {8'd0, 8'd1, 8'd2, 8'd3}, 3860);
         3: return mk(8'hD4, {8'd7, 8'd5, 8'd4, 8'd3, 8'd1, 8'd0}, 8'hB5, 6'h19,
                   {8'd5, 8'd7, 8'd6, 8'd3, 8'd0, 8'd2, 8'd4, 8'd1},
                   {8'd1, 8'd0, 8'd4, 8'd2, 8'd5, 8'd3}, {8'd0, 8'd1, 8'd2, 8'd3}, 4463);
         4: return mk(8'hE7, {8'd7, 8'd5, 8'd4, 8'd2, 8'd1, 8'd0}, 8'h09, 6'h03,
                   {8'd5, 8'd3, 8'd6, 8'd4, 8'd7, 8'd0, 8'd2, 8'd1},
                   {8'd0, 8'd2, 8'd3, 8'd1, 8'd4, 8'd5}, {8'd0, 8'd1, 8'd2, 8'd3}, 3248);
         5: return mk(8'hAF, {8'd7, 8'd6, 8'd5, 8'd4, 8'd3, 8'd0}, 8'hD0, 6'h09,
                   {8'd7, 8'd0, 8'd3, 8'd2, 8'd1, 8'd5, 8'd6, 8'd4},
                   {8'd3, 8'd1, 8'd0, 8'd2, 8'd5, 8'd4}, {8'd0, 8'd1, 8'd2, 8'd3}, 6030);
         6: return mk(8'h8E, {8'd7, 8'd6, 8'd3, 8'd2, 8'd1, 8'd0}, 8'hFF, 6'h0E,
                   {8'd0, 8'd1, 8'd2, 8'd3, 8'd4, 8'd5, 8'd6, 8'd7},
                   {8'd0, 8'd1, 8'd2, 8'd3, 8'd4, 8'd5}, {8'd0, 8'd1, 8'd2, 8'd3}, 4271);
         7: return mk(8'h95, {8'd7, 8'd6, 8'd3, 8'd2, 8'd1, 8'd0}, 8'h3E, 6'h20,
                   {8'd0, 8'd1, 8'd6, 8'd3, 8'd2, 8'd4, 8'd5, 8'd7},
                   {8'd4, 8'd0, 8'd2, 8'd3, 8'd5, 8'd1}, {8'd0, 8'd1, 8'd2, 8'd3}, 8812);
         8: return mk(8'h96, {8'd7, 8'd6, 8'd5, 8'd4, 8'd1, 8'd0}, 8'h8C, 6'h34,
                   {8'd4, 8'd1, 8'd6, 8'd5, 8'd7, 8'd3, 8'd0, 8'd2},
                   {8'd0, 8'd1, 8'd2, 8'd5, 8'd3, 8'd4}, {8'd0, 8'd1, 8'd2, 8'd3}, 7166);
         9: return mk(8'hC6, {8'd7, 8'd6, 8'd5, 8'd3, 8'd1, 8'd0}, 8'hBF, 6'h28,
                   {8'd6, 8'd4, 8'd7, 8'd1, 8'd3, 8'd2, 8'd5, 8'd0},
                   {8'd0, 8'd3, 8'd1, 8'd4, 8'd5, 8'd2}, {8'd0, 8'd1, 8'd2, 8'd3}, 4889);
        10: return mk(8'hA6, {8'd5, 8'd4, 8'd3, 8'd2, 8'd1, 8'd0}, 8'h17, 6'h3B,
                   {8'd6, 8'd3, 8'd4, 8'd7, 8'd1, 8'd2, 8'd0, 8'd5},
                   {8'd0, 8'd2, 8'd1, 8'd5, 8'd3, 8'd4}, {8'd0, 8'd1, 8'd2, 8'd3}, 2785);
        11: return mk(8'hB2, {8'd7, 8'd6, 8'd5, 8'd3, 8'd2, 8'd1}, 8'h8B, 6'h2B,
                   {8'd7, 8'd1, 8'd0, 8'd4, 8'd5, 8'd3, 8'd2, 8'd6},
                   {8'd3, 8'd2, 8'd5, 8'd0, 8'd1, 8'd4}, {8'd0, 8'd1, 8'd2, 8'd3}, 5018);
        12: return mk(8'hE7, {8'd7, 8'd6, 8'd5, 8'd4, 8'd3, 8'd2}, 8'h30, 6'h0A,
                   {8'd7, 8'd6, 8'd3, 8'd1, 8'd0, 8'd2, 8'd4, 8'd5},
                   {8'd4, 8'd5, 8'd1, 8'd3, 8'd0, 8'd2}, {8'd0, 8'd1, 8'd2, 8'd3}, 5207);
        default: return '0;
      endcase
    end else begin
      case (id)
         1: return mk(1, {8'd7, 8'd6, 8'd5, 8'd4, 8'd3, 8'd1}, 8'hE5, 6'h32,
                   {8'd6, 8'd2, 8'd1, 8'd7, 8'd5, 8'd4, 8'd3, 8'd0},
                   {8'd3, 8'd4, 8'd2, 8'd1, 8'd5, 8'd0}, {8'd0, 8'd1, 8'd2, 8'd3}, 4410);
         2: return mk(5, {8'd7, 8'd6, 8'd5, 8'd3, 8'd2, 8'd1}, 8'hAD, 6'h28,
                   {8'd6, 8'd5, 8'd1, 8'd2, 8'd0, 8'd3, 8'd4, 8'd7},
                   {8'd2, 8'd5, 8'd1, 8'd3, 8'd4, 8'd0}, {8'd0, 8'd1, 8'd2, 8'd3}, 3737);
         3: return mk(3, {8'd7, 8'd6, 8'd5, 8'd4, 8'd2, 8'd0}, 8'h38, 6'h1B,
                   {8'd7, 8'd2, 8'd0, 8'd1, 8'd4, 8'd6, 8'd3, 8'd5},
                   {8'd5, 8'd4, 8'd1, 8'd3, 8'd0, 8'd2}, {8'd0, 8'd1, 8'd2, 8'd3}, 4429);
         4: return mk(5, {8'd7, 8'd6, 8'd5, 8'd4, 8'd3, 8'd1}, 8'hCB, 6'h2F,
                   {8'd6, 8'd5, 8'd3, 8'd2, 8'd1, 8'd4, 8'd0, 8'd7},
                   {8'd5, 8'd2, 8'd1, 8'd0, 8'd4, 8'd3}, {8'd0, 8'd1, 8'd2, 8'd3}, 4257);
         5: return mk(8, {8'd7, 8'd6, 8'd4, 8'd2, 8'd1, 8'd0}, 8'h39, 6'h3A,
                   {8'd6, 8'd7, 8'd3, 8'd5, 8'd2, 8'd4, 8'd0, 8'd1},
                   {8'd3, 8'd5, 8'd1, 8'd0, 8'd4, 8'd2}, {8'd0, 8'd1, 8'd2, 8'd3}, 8439);
         6: return mk(7, {8'd7, 8'd6, 8'd5, 8'd4, 8'd3, 8'd1}, 8'hB4, 6'h0C,
                   {8'd6, 8'd2, 8'd5, 8'd3, 8'd0, 8'd1, 8'd4, 8'd7},
                   {8'd5, 8'd2, 8'd0, 8'd1, 8'd3, 8'd4}, {8'd0, 8'd1, 8'd2, 8'd3}, 3932);
         7: return mk(4, {8'd7, 8'd6, 8'd5, 8'd3, 8'd2, 8'd0}, 8'h07, 6'h3A,
                   {8'd7, 8'd6, 8'd5, 8'd1, 8'd0, 8'd2, 8'd3, 8'd4},
                   {8'd0, 8'd4, 8'd3, 8'd1, 8'd2, 8'd5}, {8'd0, 8'd1, 8'd2, 8'd3}, 4514);
         8: return mk(6, {8'd7, 8'd6, 8'd5, 8'd4, 8'd2, 8'd1}, 8'h23, 6'h20,
                   {8'd5, 8'd7, 8'd2, 8'd1, 8'd3, 8'd0, 8'd6, 8'd4},
                   {8'd4, 8'd3, 8'd0, 8'd1, 8'd5, 8'd2}, {8'd0, 8'd1, 8'd2, 8'd3}, 11183);
         9: return mk(8, {8'd7, 8'd5, 8'd4, 8'd3, 8'd1, 8'd0}, 8'h81, 6'h2E,
                   {8'd7, 8'd5, 8'd2, 8'd1, 8'd6, 8'd4, 8'd3, 8'd0},
                   {8'd2, 8'd0, 8'd1, 8'd3, 8'd5, 8'd4}, {8'd0, 8'd1, 8'd2, 8'd3}, 7269);
        10: return mk(1, {8'd7, 8'd6, 8'd5, 8'd4, 8'd3, 8'd1}, 8'h3B, 6'h2A,
                   {8'd2, 8'd7, 8'd0, 8'd4, 8'd6, 8'd1, 8'd5, 8'd3},
                   {8'd3, 8'd1, 8'd5, 8'd4, 8'd0, 8'd2}, {8'd0, 8'd1, 8'd2, 8'd3}, 2019);
        11: return mk(4, {8'd6, 8'd5, 8'd4, 8'd3, 8'd2, 8'd0}, 8'hB5, 6'h17,
                   {8'd6, 8'd5, 8'd4, 8'd3, 8'd7, 8'd1, 8'd0, 8'd2},
                   {8'd5, 8'd1, 8'd2, 8'd0, 8'd4, 8'd3}, {8'd0, 8'd1, 8'd2, 8'd3}, 5371);
        12: return mk(7, {8'd7, 8'd6, 8'd5, 8'd4, 8'd1, 8'd0}, 8'h7C, 6'h2C,
                   {8'd6, 8'd7, 8'd4, 8'd3, 8'd2, 8'd0, 8'd5, 8'd1},
                   {8'd4, 8'd3, 8'd2, 8'd0, 8'd5, 8'd1}, {8'd0, 8'd1, 8'd2, 8'd3}, 4748);
        default: return '0;
      endcase
    end
  endfunction

endpackage
