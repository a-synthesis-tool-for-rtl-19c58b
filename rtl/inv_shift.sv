// inv_shift -- the "Inverting/Noninverting and Shifting" block of a FIR fold.
//
// Turns stored seed products into real tap products. For every term t there is
// one multiplexer with one input per phase of the fold period (a 4-to-1
// multiplexer for the four-phase block transform): in schedule phase p it reads
// the product of seed SEL[t][p].seed that is d = SEL[t][p].delay clocks old,
// shifts it left by SEL[t][p].shift and negates it if SEL[t][p].neg, so the
// result is +/- 2^s * c_j * x[a - d]. Where that product sits follows from the
// register allocation ENTRY (word index j for d = 0, else NSEEDS + ENTRY[c] +
// d - 1 for its class c); every multiplexer input is a fixed word.
// The selection table is a constant worked out from the filters of the fold;
// the switching instances of the source design are exactly its columns.
//
// Timing: the multiplexer and negator are followed by one register, so a term
// appears one clock after the phase it was selected in (negators have a
// one-clock operation delay in the source design). en = 0 holds the registers.
// A coefficient times 2^shift must stay below 2^(COEF_BITS-1) in magnitude, so
// the term fits in PW bits. Reset (synchronous, active high) clears the terms.
module inv_shift
  import mrf_pkg::*;
#(
  parameter int unsigned PW     = X_BITS + COEF_BITS - 1,
  parameter int unsigned NTERM  = ANA_TERMS,
  parameter int unsigned PHASES = FOLD_PER,
  parameter tap_sel_t [0:NTERM-1][0:PHASES-1] SEL = ana_table(),
  parameter entry_t      ENTRY  = alloc_entries(ana_sel_max(), ANA_TERMS, FOLD_PER),
  parameter int unsigned NREG   = alloc_nreg(ana_sel_max(), ANA_TERMS, FOLD_PER)
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          en,
  input  logic [$clog2(PHASES)-1:0]     phase,
  input  logic signed [PW-1:0]          word [NSEEDS + NREG],
  output logic signed [PW-1:0]          term [NTERM]
);

  logic signed [PW-1:0] pick [NTERM];

  for (genvar t = 0; t < int'(NTERM); t++) begin : g_term
    // the multiplexer: input p is the word this term reads in phase p
    logic signed [PW-1:0] cand [PHASES];
    logic signed [PW-1:0] muxed;

    for (genvar p = 0; p < int'(PHASES); p++) begin : g_phase
      localparam int A = read_addr(ENTRY, int'(PHASES), p, int'(SEL[t][p].seed),
                                   int'(SEL[t][p].delay));
      assign cand[p] = word[A];
    end

    // negator and shifter, controlled by the same phase
    always_comb begin
      muxed   = cand[phase];
      pick[t] = muxed;
      for (int p = 0; p < int'(PHASES); p++) begin
        if (int'(phase) == p) begin
          pick[t] = muxed <<< SEL[t][p].shift;
          if (SEL[t][p].neg) pick[t] = -pick[t];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < int'(NTERM); t++) term[t] <= '0;
    end else if (en) begin
      for (int t = 0; t < int'(NTERM); t++) term[t] <= pick[t];
    end
  end

endmodule
