// recombination_chain -- the delay-and-add chain at the end of a synthesis bank.
//
// A synthesis filter bank filters every upsampled band on its own and adds the
// results through a chain of delays: x_hat[n] = sum_k w_k[n - k]. This block
// takes the NBANDS band-filter outputs w_k[n] of one index n in parallel (the
// parallel outputs of the synthesis fold) and forms that sum in transposed form:
//
//   acc[K-1] <= w[K-1];   acc[k] <= w[k] + acc[k+1]  (k = K-2 .. 0);   x_hat = acc[0]
//
// so K - 1 adders, each one clock, whose output registers are also the delays of
// the chain. The structure (delays between the band outputs, adders in a chain)
// follows the source design's synthesis bank; using the adder registers as the
// delays is this design's choice.
//
// Interface and timing: w and w_valid come from the fold; w_valid is high for one
// clock per new index and low in the clock after a stall. x_hat[n] is in acc[0]
// one enabled clock after w[n] was presented, x_valid being high for one clock
// per new output from x_hat[0] on. en = 0 holds everything. Widths grow by
// ceil(log2(K)) bits, so nothing overflows. Reset is synchronous, active high.
module recombination_chain
  import mrf_pkg::*;
#(
  parameter int unsigned WW = 2 * X_BITS + 2 * COEF_BITS,
  parameter int unsigned K  = NBANDS,
  parameter int unsigned XW = WW + $clog2(K)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic signed [WW-1:0] w [K],
  input  logic                 w_valid,
  output logic signed [XW-1:0] x_hat,
  output logic                 x_valid
);

  logic signed [XW-1:0] acc [K];
  logic                 started;   // the fold's output has been valid at least once

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < int'(K); k++) acc[k] <= '0;
      started <= 1'b0;
      x_valid <= 1'b0;
    end else begin
      if (en) begin
        acc[K-1] <= XW'(w[K-1]);
        for (int k = 0; k < int'(K) - 1; k++) acc[k] <= XW'(w[k]) + acc[k+1];
      end
      started <= started || w_valid;
      x_valid <= en && (started || w_valid);
    end
  end

  assign x_hat = acc[0];

endmodule
