// tb_inv_shift -- checks the per-tap multiplexers, negators and shifters.
//
// Instance 1 uses the default (analysis) table and register allocation: in
// phase p, term m must be the stored product of the seed with the magnitude of
// G_k[m], k = (4 - p) mod 4, read at age m (live product for m = 0, else
// register ENTRY[c] + m - 1 of its class c), negated for a negative
// coefficient, one enabled clock after the phase was presented. The expected
// values come from the tb's own integer table of the filters. Instance 2 has a
// two-phase table with shifts and a hand-made allocation, checked against
// hand-written expectations.
module tb_inv_shift;
  import mrf_pkg::*;

  localparam int PW = 19;
  localparam int G [4][8] = '{
    '{  9,  25,  49,  61,  61,  49,  25,   9},
    '{-25, -61,  -9,  49, -49,   9,  61,  25},
    '{-49,   9,  61, -25, -25,  61,   9, -49},
    '{ 61, -49,  25,  -9,   9, -25,  49, -61}
  };

  function automatic int seed_of(int c);
    int a;
    a = (c < 0) ? -c : c;
    return (a == 9) ? 0 : (a == 25) ? 1 : (a == 49) ? 2 : 3;
  endfunction

  // instance 2: term 0 = {phase 0: +4 * seed 1 at age 2, phase 1: -seed 3 live}
  //             term 1 = {phase 0: -2 * seed 0 at age 1, phase 1: +8 * seed 2 at age 3}
  localparam tap_sel_t [0:1][0:1] SEL2 = '{
    '{'{seed: 2'd1, delay: 4'd2, neg: 1'b0, shift: 2'd2},
      '{seed: 2'd3, delay: 4'd0, neg: 1'b1, shift: 2'd0}},
    '{'{seed: 2'd0, delay: 4'd1, neg: 1'b1, shift: 2'd1},
      '{seed: 2'd2, delay: 4'd3, neg: 1'b0, shift: 2'd3}}
  };

  logic clk = 1'b0, rst, en;
  logic [1:0] phase;
  logic       phase2;
  // instance 2 allocation: class 1 (phase 0, seed 1) enters register 0, class 4
  // (phase 1, seed 0) register 2, class 2 (phase 0, seed 2) register 4
  function automatic entry_t entry2();
    entry_t e;
    e = '1;
    e[1] = 8'd0;
    e[4] = 8'd2;
    e[2] = 8'd4;
    return e;
  endfunction

  logic signed [PW-1:0] word  [NSEEDS + dut.NREG];
  logic signed [PW-1:0] word2 [NSEEDS + 8];
  logic signed [PW-1:0] term  [ANA_TERMS];
  logic signed [PW-1:0] term2 [2];

  inv_shift #(.PW(PW)) dut (.clk, .rst, .en, .phase, .word, .term);
  inv_shift #(.PW(PW), .NTERM(2), .PHASES(2), .SEL(SEL2), .ENTRY(entry2()), .NREG(8))
    dut2 (.clk, .rst, .en, .phase(phase2), .word(word2), .term(term2));
  always #5 clk = ~clk;

  int checks = 0, failures = 0, negs = 0;
  longint exp1 [ANA_TERMS], exp2 [2];
  bit have = 0;

  always @(posedge clk) if (!rst && en) begin
    int k, j, a;
    k = (4 - int'(phase)) % 4;
    for (int m = 0; m < ANA_TERMS; m++) begin
      j = seed_of(G[k][m]);
      a = (m == 0) ? j
                   : NSEEDS + int'(dut.ENTRY[((int'(phase) - m + 8) % 4) * NSEEDS + j]) + m - 1;
      exp1[m] = longint'(word[a]);
      if (G[k][m] < 0) begin exp1[m] = -exp1[m]; negs++; end
    end
    if (phase2 == 1'b0) begin
      exp2[0] =  4 * longint'(word2[5]);     // seed 1, age 2: register 0 + 1
      exp2[1] = -2 * longint'(word2[6]);     // seed 0, age 1: register 2 + 0
    end else begin
      exp2[0] = -longint'(word2[3]);         // seed 3, live
      exp2[1] =  8 * longint'(word2[10]);    // seed 2, age 3: register 4 + 2
    end
    have = 1;
  end

  always @(negedge clk) if (!rst && have) begin
    for (int m = 0; m < ANA_TERMS; m++) begin
      checks++;
      if (longint'(term[m]) !== exp1[m]) begin
        failures++;
        $display("term[%0d] = %0d, expected %0d (phase %0d)", m, term[m], exp1[m], phase);
      end
    end
    for (int m = 0; m < 2; m++) begin
      checks++;
      if (longint'(term2[m]) !== exp2[m]) begin
        failures++;
        $display("term2[%0d] = %0d, expected %0d", m, term2[m], exp2[m]);
      end
    end
  end

  initial begin
    rst = 1'b1; en = 1'b0; phase = '0; phase2 = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en = ($urandom % 5) != 0;
      phase = 2'($urandom);
      phase2 = 1'($urandom);
      // magnitudes small enough that a shift by 3 stays in range
      foreach (word[i])  word[i]  = PW'($signed(15'($urandom)));
      foreach (word2[i]) word2[i] = PW'($signed(15'($urandom)));
    end
    @(negedge clk);
    checks++;
    if (negs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
