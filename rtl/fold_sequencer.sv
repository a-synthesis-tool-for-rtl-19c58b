// fold_sequencer -- schedule counter of a folded multirate FIR node.
//
// The filters of a fold take turns on the shared hardware with the fold period
// tau_F = PHASES clocks. This block counts that period: phase is the index of the
// newest stored input sample modulo PHASES, which is what the multiplexers of the
// inverting/shifting stage switch on. It also counts the pipeline fill: out_valid
// rises once FILL enabled clocks have passed since reset, i.e. when the output
// register first holds sample 0 of the output stream, and out_phase is then the
// index of the output sample modulo PHASES.
//
// Timing: all three outputs are registers that advance on every clock with en = 1
// and hold otherwise; out_valid is low in the clock after one with en = 0, so a
// downstream block that advances on out_valid takes every output exactly once;
// two assertions state these rules.
// PHASE0 and OPHASE0 are the reset values that align the counters with the
// datapath latency (worked out by the enclosing fold). Reset is synchronous,
// active high. A single clock drives the whole fold, as in the source design;
// the enable is this design's own choice for stalling a stream.
module fold_sequencer #(
  parameter int unsigned PHASES  = 4,
  parameter int unsigned PHASE0  = 0,
  parameter int unsigned OPHASE0 = 0,
  parameter int unsigned FILL    = 6
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      en,
  output logic [$clog2(PHASES)-1:0] phase,
  output logic [$clog2(PHASES)-1:0] out_phase,
  output logic                      out_valid
);

  localparam int unsigned PW = $clog2(PHASES);
  localparam int unsigned CW = $clog2(FILL + 1);

  logic [CW-1:0] filled;   // enabled clocks since reset, saturating at FILL

  function automatic logic [PW-1:0] next_phase(logic [PW-1:0] p);
    return (int'(p) == int'(PHASES) - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= PW'(PHASE0);
      out_phase <= PW'(OPHASE0);
      filled    <= '0;
      out_valid <= 1'b0;
    end else begin
      if (en) begin
        phase     <= next_phase(phase);
        out_phase <= next_phase(out_phase);
        if (int'(filled) < int'(FILL)) filled <= filled + 1'b1;
      end
      out_valid <= en && (int'(filled) + 1 >= int'(FILL));
    end
  end

  // handshake rules, checked one clock later: a stalled clock produces no
  // output, and the phase moves on by exactly one step per enabled clock and
  // holds otherwise
  logic          chk_armed, en_q;
  logic [PW-1:0] phase_q;

  always_ff @(posedge clk) begin
    chk_armed <= !rst;
    en_q      <= en;
    phase_q   <= phase;
    if (chk_armed && !rst) begin
      if (!en_q) a_stall_no_output: assert (!out_valid);
      a_phase_step: assert (phase == (en_q ? next_phase(phase_q) : phase_q));
    end
  end

endmodule
