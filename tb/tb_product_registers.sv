// tb_product_registers -- checks the lifetime-allocated Registers block.
//
// Uses the analysis schedule. Random seed products arrive every enabled clock
// while the phase advances as in the fold; stalls and a mid-run reset are
// applied. For every phase, each product a tap reads at delay d >= 1 (worked
// out here from the tb's own filter table) must be the product of that seed
// from d enabled clocks earlier, found at register ENTRY[c] + d - 1 of its class
// c, and zero if it was born before the reset. The live products must pass
// straight through, and the chain must be no longer than 17 registers, the
// most products alive at one time for this schedule.
module tb_product_registers;
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

  logic clk = 1'b0, rst, en;
  logic [1:0] phase;
  logic signed [PW-1:0] prod [NSEEDS];
  logic signed [PW-1:0] word [NSEEDS + dut.NREG];

  product_registers #(.PW(PW)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, taken = 0, reads = 0;
  longint hist [NSEEDS][2048];

  always @(posedge clk) begin
    if (rst) begin
      taken = 0;
      phase <= 2'd0;
    end else if (en) begin
      for (int j = 0; j < NSEEDS; j++) hist[j][taken] = longint'(prod[j]);
      taken++;
      phase <= phase + 2'd1;
    end
  end

  always @(negedge clk) if (!rst) begin
    int k, j, c, addr;
    longint expv;
    k = (4 - int'(phase)) % 4;
    for (int m = 1; m < 8; m++) begin
      j = seed_of(G[k][m]);
      c = ((int'(phase) - m + 8) % 4) * NSEEDS + j;
      addr = NSEEDS + int'(dut.ENTRY[c]) + m - 1;
      expv = (taken - m >= 0) ? hist[j][taken - m] : 0;
      checks++;
      reads++;
      if (longint'(word[addr]) !== expv) begin
        failures++;
        $display("phase %0d seed %0d age %0d: reg %0d = %0d, expected %0d",
                 phase, j, m, addr - NSEEDS, word[addr], expv);
      end
    end
    for (int s = 0; s < NSEEDS; s++) begin
      checks++;
      if (word[s] !== prod[s]) failures++;
    end
  end

  initial begin
    rst = 1'b1; en = 1'b0;
    for (int j = 0; j < NSEEDS; j++) prod[j] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      rst = (i == 300);
      en  = ($urandom % 4) != 0;
      for (int j = 0; j < NSEEDS; j++) prod[j] = PW'($urandom);
    end
    @(negedge clk);
    checks++;
    if (dut.NREG > 17) begin
      failures++;
      $display("chain of %0d registers", dut.NREG);
    end
    $display("chain registers %0d, reads checked %0d", dut.NREG, reads);
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
