// mrf_pkg -- shared types, constants and schedule tables for the multiplierless
// folded multirate FIR architecture and its four-band block-transform instance.
//
// A fold of K-tap multirate FIR filters whose coefficients all come from one small
// set of seed coefficients c_j is built as: scaling adders (form c_j*x), registers
// (hold past seed products), an inverting/noninverting and shifting stage (per tap,
// a multiplexer picks a stored product according to the schedule phase and negates
// or shifts it) and combination adders (sum the taps). Which product each tap
// picks in each phase of the fold period is a constant table computed here.
//
// Follows the source design: 4 bands, 8 taps per filter, a set of four seed
// coefficients c0..c3 shared by all filters, 8-bit quantized coefficients, adders
// and negators with a one-clock delay, a fold period of 4 clocks.
// Own choices: the seed values and the recipe that forms them, the sign and seed
// pattern of the filters G0..G3 (the source takes them from elsewhere and does not
// print them), the data widths and the table encodings below.
package mrf_pkg;

  // ---- sizes of the four-band block transform ----------------------------------
  localparam int unsigned NBANDS     = 4;   // M-band transform, M = 4
  localparam int unsigned NTAPS      = 8;   // K, taps per filter
  localparam int unsigned NSEEDS     = 4;   // seed coefficients c0..c3
  localparam int unsigned COEF_BITS  = 8;   // quantized coefficient word (sign + 7 bits)
  localparam int unsigned FOLD_PER   = 4;   // fold period tau_F in clocks
  localparam int unsigned X_BITS     = 12;  // input sample width (own choice)

  // ---- seed recipe: each seed is one two-term adder ---------------------------
  // seed_j = (+/-)(src_a << sh_a) + (+/-)(src_b << sh_b)
  // Source index 0 is the input sample, index i+1 is seed i (i < j).
  typedef struct packed {
    logic [2:0] a_src;
    logic [2:0] a_sh;
    logic       a_neg;
    logic [2:0] b_src;
    logic [2:0] b_sh;
    logic       b_neg;
  } seed_recipe_t;

  // c0 = 9 = 8x + x ; c1 = 25 = 16x + c0 ; c2 = 49 = 2*c1 - x ; c3 = 61 = c1 + 4*c0
  // (values in units of 2^-7, i.e. 0.0703, 0.1953, 0.3828, 0.4766)
  typedef seed_recipe_t [0:NSEEDS-1] recipe_t;

  localparam recipe_t SEED_RECIPE = '{
    '{a_src: 3'd0, a_sh: 3'd3, a_neg: 1'b0, b_src: 3'd0, b_sh: 3'd0, b_neg: 1'b0},
    '{a_src: 3'd0, a_sh: 3'd4, a_neg: 1'b0, b_src: 3'd1, b_sh: 3'd0, b_neg: 1'b0},
    '{a_src: 3'd2, a_sh: 3'd1, a_neg: 1'b0, b_src: 3'd0, b_sh: 3'd0, b_neg: 1'b1},
    '{a_src: 3'd2, a_sh: 3'd0, a_neg: 1'b0, b_src: 3'd1, b_sh: 3'd2, b_neg: 1'b0}
  };

  // ---- filter coefficients as (seed, sign, shift) -------------------------------
  typedef struct packed {
    logic [1:0] seed;
    logic       neg;
    logic [1:0] shift;
  } coef_t;

  function automatic coef_t cf(logic [1:0] s, logic n);
    coef_t c;
    c.seed  = s;
    c.neg   = n;
    c.shift = 2'd0;
    return c;
  endfunction

  // G[k][m]: tap m of band filter G_k. Each filter uses every seed twice and is
  // linear phase (G0, G2 symmetric; G1, G3 antisymmetric).
  typedef coef_t [0:NTAPS-1]  coef_row_t;
  typedef coef_row_t [0:NBANDS-1] filt_tab_t;

  function automatic filt_tab_t bank_coefs();
    filt_tab_t g;
    g[0] = '{cf(0,0), cf(1,0), cf(2,0), cf(3,0), cf(3,0), cf(2,0), cf(1,0), cf(0,0)};
    g[1] = '{cf(1,1), cf(3,1), cf(0,1), cf(2,0), cf(2,1), cf(0,0), cf(3,0), cf(1,0)};
    g[2] = '{cf(2,1), cf(0,0), cf(3,0), cf(1,1), cf(1,1), cf(3,0), cf(0,0), cf(2,1)};
    g[3] = '{cf(3,0), cf(2,1), cf(1,0), cf(0,1), cf(0,0), cf(1,1), cf(2,0), cf(3,1)};
    return g;
  endfunction

  // ---- per-tap selection table of the inverting/shifting stage -----------------
  // For term t in schedule phase p: take seed product c_seed * x[newest - delay],
  // negate it if neg, shift it left by shift.
  typedef struct packed {
    logic [1:0] seed;
    logic [3:0] delay;
    logic       neg;
    logic [1:0] shift;
  } tap_sel_t;

  localparam int unsigned ANA_TERMS = NTAPS;             // one term per tap
  localparam int unsigned SYN_TERMS = 2 * NBANDS;        // two nonzero taps per band

  // packed tables, indexed [term][phase]
  typedef tap_sel_t [0:ANA_TERMS-1][0:FOLD_PER-1] ana_tab_t;
  typedef tap_sel_t [0:SYN_TERMS-1][0:FOLD_PER-1] syn_tab_t;

  // Analysis: with a the index of the newest input whose products are stored and
  // p = a mod 4, the fold computes y[a+3] = sum_m G_k[m] x[a-m], k = (-a) mod 4.
  function automatic ana_tab_t ana_table();
    ana_tab_t   t;
    filt_tab_t  g;
    int         k;
    g = bank_coefs();
    for (int p = 0; p < int'(FOLD_PER); p++) begin
      k = (int'(NBANDS) - p) % int'(NBANDS);
      for (int m = 0; m < int'(NTAPS); m++) begin
        t[m][p].seed  = g[k][m].seed;
        t[m][p].delay = 4'(m);
        t[m][p].neg   = g[k][m].neg;
        t[m][p].shift = g[k][m].shift;
      end
    end
    return t;
  endfunction

  // Synthesis: the band filters w_k[n] = sum_m G_k[m] u_k[n-m] of one output
  // index n, u_k being band k upsampled by 4 (u_k[4l] = y[4l+3-k]). Only taps
  // m = (n mod 4) + 4r, r = 0,1, meet a nonzero u_k, so with b the index of the
  // newest stored y and n = b - 3, w_k[n] = sum_r G_k[m] y[b - m - k]. Term 2k+r
  // serves band k; p = b mod 4, so n mod 4 = (p + 1) mod 4.
  function automatic syn_tab_t syn_table();
    syn_tab_t   t;
    filt_tab_t  g;
    int         n4, m;
    g = bank_coefs();
    for (int p = 0; p < int'(FOLD_PER); p++) begin
      n4 = (p + 1) % 4;
      for (int k = 0; k < int'(NBANDS); k++) begin
        for (int r = 0; r < 2; r++) begin
          m = n4 + 4*r;
          t[2*k+r][p].seed  = g[k][m].seed;
          t[2*k+r][p].delay = 4'(m + k);
          t[2*k+r][p].neg   = g[k][m].neg;
          t[2*k+r][p].shift = g[k][m].shift;
        end
      end
    end
    return t;
  endfunction

  // Adder stage at which source s of a recipe is ready (s = 0: the input, stage
  // 0; s = j+1: seed j), with every adder scheduled as soon as possible.
  function automatic int recipe_level(recipe_t r, int s);
    int lv [NSEEDS+1];
    int la, lb;
    lv[0] = 0;
    for (int i = 0; i < int'(NSEEDS); i++) begin
      la = lv[r[i].a_src];
      lb = lv[r[i].b_src];
      lv[i+1] = 1 + ((la > lb) ? la : lb);
    end
    return lv[s];
  endfunction

  // Depth of the scaling adders: the stage of the deepest seed.
  function automatic int recipe_depth(recipe_t r);
    int m;
    m = 1;
    for (int s = 1; s <= int'(NSEEDS); s++)
      if (recipe_level(r, s) > m) m = recipe_level(r, s);
    return m;
  endfunction

  // ---- register allocation of the Registers block ------------------------------
  // Seed products move one register down a chain every clock. A product of seed j
  // born in phase i (its sample index is i modulo the fold period P) belongs to
  // class c = i*NSEEDS + j. Every product of a class enters the chain at the same
  // register ENTRY[c], one clock after it is born, and is read at age d from
  // register ENTRY[c] + d - 1. It stays in the chain only while some tap still
  // needs it (its lifetime L = the largest delay any tap reads it at).
  // Register r then holds class c in one phase only, (i + 1 + r - ENTRY[c]) mod P,
  // so classes with the same diagonal (i + 1 - ENTRY[c]) mod P must use disjoint
  // register ranges, and classes on different diagonals never collide. The
  // allocation packs the classes, longest first, each at the diagonal and entry
  // that end lowest. The read address of every tap still repeats every P clocks.
  localparam int unsigned MAXT = 16;                 // most terms per fold
  localparam int unsigned MAXP = 8;                  // longest fold period
  localparam int unsigned MAXR = 64;                 // longest register chain
  localparam int unsigned NCLS = MAXP * NSEEDS;      // product classes
  localparam logic [7:0]  NOT_STORED = 8'hFF;

  typedef tap_sel_t [0:MAXT-1][0:MAXP-1] sel_max_t;  // a tap table, padded
  typedef logic [0:NCLS-1][7:0]          entry_t;    // ENTRY[c] or NOT_STORED

  // lifetime of class c: the largest delay at which a tap reads it (0: never
  // read from a register)
  function automatic int class_life(sel_max_t s, int nterm, int np, int c);
    int life, i, j, d;
    life = 0;
    i = c / int'(NSEEDS);
    j = c % int'(NSEEDS);
    for (int t = 0; t < nterm; t++)
      for (int p = 0; p < np; p++) begin
        d = int'(s[t][p].delay);
        if (int'(s[t][p].seed) == j && d > 0 && ((p - d) % np + np) % np == i && d > life)
          life = d;
      end
    return life;
  endfunction

  function automatic entry_t alloc_entries(sel_max_t s, int nterm, int np);
    entry_t                  e;
    logic [MAXP*MAXR-1:0]    occ;      // occ[diag*MAXR + r]: register r used
    int                      life [NCLS];
    int                      best_e, best_d, best_end, i, ok;
    e   = '1;
    occ = '0;
    for (int c = 0; c < np * int'(NSEEDS); c++) life[c] = class_life(s, nterm, np, c);
    for (int l = int'(MAXR); l >= 1; l--) begin
      for (int c = 0; c < np * int'(NSEEDS); c++) begin
        if (life[c] == l) begin
          i = c / int'(NSEEDS);
          best_end = int'(MAXR) + 1;
          best_e   = int'(MAXR);   // kept if nothing fits: NREG then exceeds MAXR
          best_d   = 0;
          for (int dg = 0; dg < np; dg++) begin
            for (int r = 0; r + l <= int'(MAXR); r++) begin
              if (((i + 1 - r - dg) % np + np) % np == 0) begin
                ok = 1;
                for (int q = r; q < r + l; q++)
                  if (occ[dg*int'(MAXR) + q]) ok = 0;
                if (ok == 1 && r + l - 1 < best_end) begin
                  best_end = r + l - 1;
                  best_e   = r;
                  best_d   = dg;
                end
              end
            end
          end
          e[c] = 8'(best_e);
          if (best_end <= int'(MAXR))
            for (int q = best_e; q < best_e + l; q++) occ[best_d*int'(MAXR) + q] = 1'b1;
        end
      end
    end
    return e;
  endfunction

  // length of the register chain an allocation needs (at least 1)
  function automatic int alloc_nreg(sel_max_t s, int nterm, int np);
    entry_t e;
    int     n, l;
    e = alloc_entries(s, nterm, np);
    n = 1;
    for (int c = 0; c < np * int'(NSEEDS); c++) begin
      l = class_life(s, nterm, np, c);
      if (l > 0 && int'(e[c]) + l > n) n = int'(e[c]) + l;
    end
    return n;
  endfunction

  // the analysis table, padded, and its allocation (defaults of the blocks)
  function automatic sel_max_t ana_sel_max();
    sel_max_t m;
    ana_tab_t a;
    m = '0;
    a = ana_table();
    for (int t = 0; t < int'(ANA_TERMS); t++)
      for (int p = 0; p < int'(FOLD_PER); p++) m[t][p] = a[t][p];
    return m;
  endfunction

  // address of the product of seed j at age d in phase p, in the word list
  // {live products 0..NSEEDS-1, chain registers NSEEDS..}
  function automatic int read_addr(entry_t e, int np, int p, int j, int d);
    int c;
    if (d == 0) return j;
    c = (((p - d) % np + np) % np) * int'(NSEEDS) + j;
    return int'(NSEEDS) + int'(e[c]) + d - 1;
  endfunction

endpackage
