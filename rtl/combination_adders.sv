// combination_adders -- the "Combination Adders" block of a FIR fold.
//
// Sums the NTERM tap terms into NOUT filter outputs. The terms are split into
// NOUT groups of NTERM/NOUT consecutive terms and every group has its own
// balanced binary tree of two-input adders. NOUT = 1 gives one output per
// clock; NOUT > 1 gives parallel outputs, which a fold of interpolating filters
// needs when several filters (or several phases of one) finish in the same
// clock. Every tree level is one pipeline stage, matching the source design's
// adders with a one-clock operation delay, so new sums start every clock and
// leave LEVELS = ceil(log2(NTERM/NOUT)) clocks later (at least 1). A missing
// leaf of a non-power-of-two tree is zero. The outputs are full precision:
// SW = TW + LEVELS bits, so nothing overflows. en = 0 holds the pipeline; reset
// (synchronous, active high) clears it.
module combination_adders
  import mrf_pkg::*;
#(
  parameter int unsigned TW    = X_BITS + COEF_BITS - 1,
  parameter int unsigned NTERM = ANA_TERMS,
  parameter int unsigned NOUT  = 1,
  parameter int unsigned SW    = TW + $clog2(NTERM / NOUT)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic signed [TW-1:0] term [NTERM],
  output logic signed [SW-1:0] sum  [NOUT]
);

  localparam int unsigned GT     = NTERM / NOUT;              // terms per output
  localparam int unsigned LEVELS = (GT > 1) ? $clog2(GT) : 1;
  localparam int unsigned LEAVES = 1 << LEVELS;

  if (GT * NOUT != NTERM) begin : g_bad_split
    $error("NTERM must be a multiple of NOUT");
  end

  for (genvar g = 0; g < int'(NOUT); g++) begin : g_out
    // level 0: the sign-extended terms of this group, zero-padded
    logic signed [SW-1:0] leaf [LEAVES];

    always_comb begin
      for (int i = 0; i < int'(LEAVES); i++)
        leaf[i] = (i < int'(GT)) ? SW'(term[g*GT + i]) : '0;
    end

    for (genvar l = 1; l <= int'(LEVELS); l++) begin : g_level
      localparam int unsigned N = LEAVES >> l;
      logic signed [SW-1:0] below [2*N];
      logic signed [SW-1:0] node  [N];

      if (l == 1) begin : g_from_leaf
        assign below = leaf;
      end else begin : g_from_level
        assign below = g_level[l-1].node;
      end

      always_ff @(posedge clk) begin
        if (rst) begin
          for (int i = 0; i < int'(N); i++) node[i] <= '0;
        end else if (en) begin
          for (int i = 0; i < int'(N); i++) node[i] <= below[2*i] + below[2*i+1];
        end
      end
    end

    assign sum[g] = g_level[LEVELS].node[0];
  end

endmodule
