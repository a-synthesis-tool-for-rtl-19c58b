// product_registers -- the "Registers" block of a multiplierless FIR fold.
//
// Holds the seed products that the taps of the fold still need, in as few
// registers as the schedule allows. The registers form one chain; every clock
// each register takes the value of the one before it, so a stored product moves
// one register down per clock. In the phase in which a product is born, the
// register ENTRY[c] of its class c (birth phase, seed) takes the new product
// from the scaling adders instead. A product therefore sits at register
// ENTRY[c] + d - 1 when it is d clocks old, in every period alike, and the read
// address of each tap repeats with the fold period (see mrf_pkg for how ENTRY
// is packed and why two classes never meet in one register).
//
// Interface: phase is the fold phase of the newest products prod[j] = c_j * x[a].
// word[0 .. NSEEDS-1] are those live products; word[NSEEDS + r] is register r.
// Products a tap reads at age 0 are never stored. Timing: registers advance on
// every clock with en = 1; reset (synchronous, active high) clears them.
// The lifetime-driven allocation with moving data follows the source design's
// register minimisation in spirit; the packing heuristic is this design's own.
module product_registers
  import mrf_pkg::*;
#(
  parameter int unsigned PW     = X_BITS + COEF_BITS - 1,
  parameter int unsigned PHASES = FOLD_PER,
  parameter entry_t      ENTRY  = alloc_entries(ana_sel_max(), ANA_TERMS, FOLD_PER),
  parameter int unsigned NREG   = alloc_nreg(ana_sel_max(), ANA_TERMS, FOLD_PER)
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      en,
  input  logic [$clog2(PHASES)-1:0] phase,
  input  logic signed [PW-1:0]      prod [NSEEDS],
  output logic signed [PW-1:0]      word [NSEEDS + NREG]
);

  logic signed [PW-1:0] chain [NREG];
  logic signed [PW-1:0] nxt   [NREG];

  always_comb begin
    for (int r = 0; r < int'(NREG); r++) begin
      nxt[r] = (r == 0) ? chain[0] : chain[r-1];
      for (int c = 0; c < int'(PHASES * NSEEDS); c++)
        if (int'(ENTRY[c]) == r && int'(phase) == c / int'(NSEEDS))
          nxt[r] = prod[c % int'(NSEEDS)];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < int'(NREG); r++) chain[r] <= '0;
    end else if (en) begin
      for (int r = 0; r < int'(NREG); r++) chain[r] <= nxt[r];
    end
  end

  always_comb begin
    for (int j = 0; j < int'(NSEEDS); j++) word[j] = prod[j];
    for (int r = 0; r < int'(NREG); r++)   word[NSEEDS + r] = chain[r];
  end

endmodule
