// mr_fir_fold -- one fold of multirate FIR filters without multipliers.
//
// Several FIR filters of the same tap count, whose coefficients are all +/- 2^s
// times one of a few shared seed coefficients c_j, are folded onto one datapath
// that produces one output per clock:
//
//   x -> scaling_adders -> product_registers -> inv_shift -> combination_adders
//        (c_j * x)         (c_j * x[a-d])      (+/-2^s, per   (adder tree)    -> y
//                                               tap, by phase)
//
// fold_sequencer counts the fold period. The tap table SEL says, for every term
// and phase, which stored product the term uses; it encodes both the filters and
// the commutators around them (decimation, interpolation), so any fold whose
// schedule repeats every PHASES clocks fits this one module.
//
// NOUT > 1 splits the terms into NOUT consecutive groups with one adder tree
// each, giving parallel outputs y[0..NOUT-1] (for folds of interpolating
// filters); the default NOUT = 1 gives one output per clock.
//
// Timing: with a the index of the newest sample whose seed products are in the
// registers, the output for that phase leaves 1 + LEVELS + OUTR clocks later
// (one clock for the negators, one per adder level, OUTR output registers). The
// output stream index is a + IDX_OFS; y_valid rises with output sample 0 and
// y_phase is the output index modulo PHASES. en = 0 stalls the whole fold.
//
// The structure and the single clock follow the source design. The register
// allocation is worked out here from SEL by lifetime (see product_registers);
// its packing rule is this design's own.
module mr_fir_fold
  import mrf_pkg::*;
#(
  parameter int unsigned XW      = X_BITS,
  parameter int unsigned NTERM   = ANA_TERMS,
  parameter int unsigned PHASES  = FOLD_PER,
  parameter int unsigned OUTR    = 2,
  parameter int          IDX_OFS = 3,
  parameter recipe_t     RECIPE  = SEED_RECIPE,
  parameter tap_sel_t [0:NTERM-1][0:PHASES-1] SEL = ana_table(),
  parameter int unsigned NOUT    = 1,
  parameter int unsigned PW      = XW + COEF_BITS - 1,
  parameter int unsigned YW      = PW + $clog2(NTERM / NOUT)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      en,
  input  logic signed [XW-1:0]      x,
  output logic signed [YW-1:0]      y [NOUT],
  output logic                      y_valid,
  output logic [$clog2(PHASES)-1:0] y_phase
);

  localparam int LS     = recipe_depth(RECIPE);
  localparam int LEVELS = (NTERM / NOUT > 1) ? $clog2(NTERM / NOUT) : 1;
  localparam int PIPE   = LS + 1 + LEVELS + int'(OUTR);   // input taken -> output
  localparam int FILL   = PIPE - IDX_OFS;
  localparam int P      = int'(PHASES);
  localparam int PHASE0 = ((-LS % P) + P) % P;
  localparam int OPH0   = ((-FILL % P) + P) % P;

  // the tap table padded to the package's maximum size, and the register
  // allocation worked out from it
  function automatic sel_max_t pad_sel();
    sel_max_t m;
    m = '0;
    for (int t = 0; t < int'(NTERM); t++)
      for (int p = 0; p < int'(PHASES); p++) m[t][p] = SEL[t][p];
    return m;
  endfunction

  localparam entry_t ENTRY = alloc_entries(pad_sel(), int'(NTERM), int'(PHASES));
  localparam int     NREG  = alloc_nreg(pad_sel(), int'(NTERM), int'(PHASES));

  logic signed [PW-1:0]       prod [NSEEDS];
  logic signed [PW-1:0]       word [NSEEDS + NREG];
  logic signed [PW-1:0]       term [NTERM];
  logic signed [YW-1:0]       sum [NOUT];
  logic [$clog2(PHASES)-1:0]  phase;

  fold_sequencer #(
    .PHASES (PHASES),
    .PHASE0 (PHASE0),
    .OPHASE0(OPH0),
    .FILL   (FILL)
  ) u_seq (
    .clk, .rst, .en,
    .phase,
    .out_phase(y_phase),
    .out_valid(y_valid)
  );

  scaling_adders #(.XW(XW), .PW(PW), .RECIPE(RECIPE)) u_scale (
    .clk, .rst, .en, .x, .prod
  );

  product_registers #(.PW(PW), .PHASES(PHASES), .ENTRY(ENTRY), .NREG(NREG)) u_regs (
    .clk, .rst, .en, .phase, .prod, .word
  );

  inv_shift #(
    .PW(PW), .NTERM(NTERM), .PHASES(PHASES), .SEL(SEL), .ENTRY(ENTRY), .NREG(NREG)
  ) u_inv (
    .clk, .rst, .en, .phase, .word, .term
  );

  if (NTERM > MAXT || PHASES > MAXP || NREG > int'(MAXR)) begin : g_too_big
    $error("fold exceeds the sizes the register allocation supports");
  end

  combination_adders #(.TW(PW), .NTERM(NTERM), .NOUT(NOUT), .SW(YW)) u_comb (
    .clk, .rst, .en, .term, .sum
  );

  // output registers
  if (OUTR == 0) begin : g_no_outr
    assign y = sum;
  end else begin : g_outr
    logic signed [YW-1:0] pipe [OUTR][NOUT];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < int'(OUTR); i++)
          for (int g = 0; g < int'(NOUT); g++) pipe[i][g] <= '0;
      end else if (en) begin
        pipe[0] <= sum;
        for (int i = 1; i < int'(OUTR); i++) pipe[i] <= pipe[i-1];
      end
    end
    assign y = pipe[OUTR-1];
  end

endmodule
