// scaling_adders -- the "Scaling Adders" block of a multiplierless FIR fold.
//
// Forms the seed products c_j * x of the shared coefficient set with one two-term
// adder per seed: seed_j = (+/-)(src_a << sh_a) + (+/-)(src_b << sh_b), where a
// source is the input sample or an earlier seed. This is the common-subexpression
// form the source design uses, where a handful of adders replace all tap
// multipliers (four adders for the four seeds of the block transform).
//
// Timing: every adder is one pipeline stage (one clock), scheduled as soon as its
// operands exist (ASAP). An operand that is ready earlier than the other is taken
// from a short alignment delay line, and every seed is delayed to the depth LAT of
// the deepest one, so all NSEEDS products of one input sample leave together, LAT
// clocks after the sample was taken in. en = 0 freezes every register (stall).
//
// Interface: x (XW bits, signed) in; prod[j] = c_j * x (PW bits, signed) out.
// The number of seeds is the package constant NSEEDS; the recipe is a parameter.
// The source design lets seeds of different depth be picked up at different times
// by the register allocation; delaying them to a common depth here is this
// design's simplification. Reset (synchronous, active high) clears the pipeline.
module scaling_adders
  import mrf_pkg::*;
#(
  parameter int unsigned  XW     = X_BITS,
  parameter int unsigned  PW     = X_BITS + COEF_BITS - 1,
  parameter recipe_t      RECIPE = SEED_RECIPE
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic signed [XW-1:0] x,
  output logic signed [PW-1:0] prod [NSEEDS]
);

  localparam int unsigned IW = XW + COEF_BITS + 2;   // internal width with headroom

  localparam int unsigned LAT = recipe_depth(RECIPE);

  // src_now[s]: source s when produced; dly[s][d]: the same value d clocks later
  logic signed [IW-1:0] src_now [NSEEDS+1];
  logic signed [IW-1:0] dly     [NSEEDS+1][LAT];

  assign src_now[0] = IW'(x);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s <= int'(NSEEDS); s++)
        for (int d = 0; d < int'(LAT); d++)
          dly[s][d] <= '0;
    end else if (en) begin
      for (int s = 0; s <= int'(NSEEDS); s++) begin
        dly[s][0] <= src_now[s];
        for (int d = 1; d < int'(LAT); d++)
          dly[s][d] <= dly[s][d-1];
      end
    end
  end

  for (genvar j = 0; j < int'(NSEEDS); j++) begin : g_seed
    localparam int LJ = recipe_level(RECIPE, j + 1);
    localparam int SA = int'(RECIPE[j].a_src);
    localparam int SB = int'(RECIPE[j].b_src);
    localparam int DA = LJ - 1 - recipe_level(RECIPE, SA);   // alignment delay of operand a
    localparam int DB = LJ - 1 - recipe_level(RECIPE, SB);   // alignment delay of operand b

    logic signed [IW-1:0] opa, opb, ta, tb;
    logic signed [IW-1:0] sum_q;

    if (DA == 0) begin : g_a_now
      assign opa = src_now[SA];
    end else begin : g_a_dly
      assign opa = dly[SA][DA-1];
    end
    if (DB == 0) begin : g_b_now
      assign opb = src_now[SB];
    end else begin : g_b_dly
      assign opb = dly[SB][DB-1];
    end

    always_comb begin
      ta = opa <<< RECIPE[j].a_sh;
      tb = opb <<< RECIPE[j].b_sh;
      if (RECIPE[j].a_neg) ta = -ta;
      if (RECIPE[j].b_neg) tb = -tb;
    end

    // the seed adder: one clock
    always_ff @(posedge clk) begin
      if (rst)     sum_q <= '0;
      else if (en) sum_q <= ta + tb;
    end
    assign src_now[j+1] = sum_q;

    // bring every seed to the common depth LAT
    if (LJ == int'(LAT)) begin : g_out_now
      assign prod[j] = PW'(sum_q);
    end else begin : g_out_dly
      assign prod[j] = PW'(dly[j+1][int'(LAT) - LJ - 1]);
    end
  end

endmodule
