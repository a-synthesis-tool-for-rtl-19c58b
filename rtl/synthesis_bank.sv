// synthesis_bank -- synthesis half of the four-band block transform, folded.
//
// The reference structure takes the interleaved band stream y apart with an input
// commutator (y[4l + 3 - k] goes to band k), upsamples each band by 4, filters it
// with the 8-tap G_k and sums the four filter outputs through a delay chain:
//
//   x_hat[n] = w0[n] + w1[n-1] + w2[n-2] + w3[n-3],   w_k = G_k * (up4 band k)
//
// For one index n only the taps m with m = n mod 4 (two per band) meet a nonzero
// upsampled sample, so
//
//   w_k[n] = sum_{r=0,1} G_k[m] * y[n + 3 - m - k],   m = (n mod 4) + 4r
//
// The four band filters are folded onto one multiplierless datapath
// (mr_fir_fold) with a fold period of 4 and four parallel outputs: the seed
// products c_j * y of the last 11 samples that are still needed are kept, eight
// 4-to-1 multiplexers with negators pick the two terms of every band for the
// current phase, and four adders give w_0[n] .. w_3[n] together. The delay-and-
// add chain (recombination_chain, three adders) then forms x_hat[n]. This two-
// stage shape, band filters in parallel followed by the chain, follows the
// source design; the register allocation and the transposed chain are this
// design's own.
//
// Interface and timing: one sample y per clock with y_valid = 1, y[0] being the
// first valid sample after reset (y_valid = 0 stalls the bank). w_k[n] needs
// y[n + 3]; x_hat[n] is in the output register 9 enabled clocks after y[n] was
// taken in, x_valid rising with x_hat[0]. Full precision: XW = YW + 10 bits.
module synthesis_bank
  import mrf_pkg::*;
#(
  parameter int unsigned YW = X_BITS + COEF_BITS - 1 + $clog2(ANA_TERMS),
  parameter int unsigned XW = YW + COEF_BITS - 1 + $clog2(SYN_TERMS)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 y_valid,
  input  logic signed [YW-1:0] y,
  output logic signed [XW-1:0] x_hat,
  output logic                 x_valid
);

  localparam int unsigned WW = XW - $clog2(NBANDS);   // band-filter output width

  logic signed [WW-1:0] w [NBANDS];  // w_k[n] of one index n
  logic                 w_valid;
  logic [1:0]           w_phase;     // n modulo 4 (not needed outside)

  mr_fir_fold #(
    .XW     (YW),
    .NTERM  (SYN_TERMS),
    .PHASES (FOLD_PER),
    .OUTR   (0),
    .IDX_OFS(-3),
    .RECIPE (SEED_RECIPE),
    .SEL    (syn_table()),
    .NOUT   (NBANDS),
    .YW     (WW)
  ) u_fold (
    .clk, .rst,
    .en     (y_valid),
    .x      (y),
    .y      (w),
    .y_valid(w_valid),
    .y_phase(w_phase)
  );

  recombination_chain #(.WW(WW), .K(NBANDS), .XW(XW)) u_chain (
    .clk, .rst,
    .en     (y_valid),
    .w,
    .w_valid,
    .x_hat,
    .x_valid
  );

endmodule
