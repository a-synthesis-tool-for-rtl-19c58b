// analysis_bank -- analysis half of the four-band block transform, folded.
//
// The reference structure is a bank of four 8-tap filters G0..G3: G_k sees the
// input delayed by k samples, its output is decimated by 4, and an output
// commutator interleaves the four bands into one stream y at the input rate:
//
//   y[4l + 3 - k] = sum_{m=0..7} G_k[m] * x[4l - k - m],   k = 0..3
//
// Substituting a = 4l - k shows that this is one 8-tap filter whose coefficient
// set changes every clock: y[a + 3] = sum_m G_k[m] x[a - m] with k = (-a) mod 4.
// All four filters are therefore folded onto a single multiplierless datapath
// (mr_fir_fold) with a fold period of 4: tap m has one 4-to-1 multiplexer that
// picks, per phase, the stored product c_j * x[a - m] of the seed the band uses,
// followed by a negator, and an adder tree sums the eight taps. Two output
// registers follow the tree, as in the source design's analysis layout.
//
// Interface and timing: one sample x per clock with x_valid = 1 (x_valid = 0
// stalls the bank). y carries the bands in the order G0, G1, G2, G3 for output
// indices 3, 2, 1, 0 modulo 4; y_band tells which filter produced the current y.
// y_valid rises with y[0]; y[i] is in the output register FILL = 6 enabled
// clocks after x[i] was taken in (full precision, YW = X_BITS + 10 bits). Samples
// before the first one after reset count as zero.
module analysis_bank
  import mrf_pkg::*;
#(
  parameter int unsigned XW = X_BITS,
  parameter int unsigned YW = XW + COEF_BITS - 1 + $clog2(ANA_TERMS)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 x_valid,
  input  logic signed [XW-1:0] x,
  output logic signed [YW-1:0] y,
  output logic                 y_valid,
  output logic [1:0]           y_band
);

  logic [1:0]           y_phase;   // output index modulo 4
  logic signed [YW-1:0] y_par [1];  // the fold's (single) output

  assign y = y_par[0];

  mr_fir_fold #(
    .XW     (XW),
    .NTERM  (ANA_TERMS),
    .PHASES (FOLD_PER),
    .OUTR   (2),
    .IDX_OFS(3),
    .RECIPE (SEED_RECIPE),
    .SEL    (ana_table()),
    .YW     (YW)
  ) u_fold (
    .clk, .rst,
    .en     (x_valid),
    .x,
    .y      (y_par),
    .y_valid,
    .y_phase
  );

  // output index 4l + 3 - k carries band k
  assign y_band = 2'd3 - y_phase;

endmodule
