// block_transform_top -- four-band block transform, analysis and synthesis.
//
// The analysis bank splits the input stream x into four interleaved bands y, and
// the synthesis bank recombines y into x_hat. Both are multiplierless folds of
// four 8-tap filters that share four seed coefficients; each needs four adders
// to form the seed products, and both run on one clock at one sample per clock.
// The band stream is brought out so that it can be observed (or, in a codec,
// quantized and stored between the two halves).
//
// Interface and timing: x/x_valid in (x_valid = 0 stalls the chain). y/y_valid/
// y_band out, 6 enabled clocks behind x; x_hat/x_hat_valid out, 9 more clocks
// behind y. Widths are full precision: X_BITS in, X_BITS + 10 for y, X_BITS + 20
// for x_hat. Whether x_hat reproduces x depends on the filter coefficients; the
// coefficient set in mrf_pkg is a placeholder with the right structure.
module block_transform_top
  import mrf_pkg::*;
#(
  parameter int unsigned XW = X_BITS,
  parameter int unsigned YW = XW + COEF_BITS - 1 + $clog2(ANA_TERMS),
  parameter int unsigned RW = YW + COEF_BITS - 1 + $clog2(SYN_TERMS)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 x_valid,
  input  logic signed [XW-1:0] x,
  output logic signed [YW-1:0] y,
  output logic                 y_valid,
  output logic [1:0]           y_band,
  output logic signed [RW-1:0] x_hat,
  output logic                 x_hat_valid
);

  analysis_bank #(.XW(XW), .YW(YW)) u_analysis (
    .clk, .rst, .x_valid, .x, .y, .y_valid, .y_band
  );

  synthesis_bank #(.YW(YW), .XW(RW)) u_synthesis (
    .clk, .rst, .y_valid, .y, .x_hat, .x_valid(x_hat_valid)
  );

endmodule
