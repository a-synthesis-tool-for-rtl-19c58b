// tb_fold_sequencer -- checks the fold period counter and the fill tracking.
//
// With PHASES = 4, PHASE0 = 1, OPHASE0 = 2, FILL = 6: phase must equal
// (1 + enabled clocks) mod 4, out_phase (2 + enabled clocks) mod 4, and
// out_valid must be high exactly in the clock after an enabled clock once at
// least 6 enabled clocks have passed since reset. Stalls and a second reset are
// applied.
module tb_fold_sequencer;
  logic clk = 1'b0, rst, en;
  logic [1:0] phase, out_phase;
  logic out_valid;

  fold_sequencer #(.PHASES(4), .PHASE0(1), .OPHASE0(2), .FILL(6)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, ne = 0, wraps = 0;
  bit last_en = 0;

  always @(posedge clk) begin
    if (rst) begin ne = 0; last_en = 0; end
    else begin
      if (en) ne++;
      last_en = en;
    end
  end

  always @(negedge clk) if (!rst) begin
    checks += 3;
    if (phase !== 2'((1 + ne) % 4)) begin failures++; $display("phase %0d after %0d", phase, ne); end
    if (out_phase !== 2'((2 + ne) % 4)) begin failures++; $display("out_phase %0d", out_phase); end
    if (out_valid !== (last_en && ne >= 6)) begin
      failures++; $display("out_valid %0d after %0d", out_valid, ne);
    end
    if (phase == 0 && last_en) wraps++;
  end

  initial begin
    rst = 1'b1; en = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      rst = (i == 150);
      en = ($urandom % 3) != 0;
    end
    @(negedge clk);
    checks++;
    if (wraps == 0) failures++;
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
