// tb_combination_adders -- checks the pipelined adder tree.
//
// Eight random terms per clock, including all-extreme cases; the sum must equal
// the plain sum of the terms taken exactly 3 enabled clocks earlier, with stalls
// holding the pipeline. A second instance with 6 terms checks zero padding; a
// third splits the 8 terms into two parallel outputs of 4 terms each (2 clocks).
module tb_combination_adders;
  localparam int TW = 19;

  logic clk = 1'b0, rst, en;
  logic signed [TW-1:0] term [8];
  logic signed [TW+2:0] sum [1], sum6 [1];
  logic signed [TW+1:0] sum2 [2];
  logic signed [TW-1:0] term6 [6];

  combination_adders #(.TW(TW), .NTERM(8)) dut  (.clk, .rst, .en, .term, .sum);
  combination_adders #(.TW(TW), .NTERM(6)) dut6 (.clk, .rst, .en, .term(term6), .sum(sum6));
  combination_adders #(.TW(TW), .NTERM(8), .NOUT(2)) dut2 (.clk, .rst, .en, .term, .sum(sum2));
  always #5 clk = ~clk;

  assign term6 = term[0:5];

  int checks = 0, failures = 0, taken = 0;
  longint s8 [2048], s6 [2048], slo [2048], shi [2048];

  always @(posedge clk) if (!rst && en) begin
    s8[taken] = 0; s6[taken] = 0; slo[taken] = 0; shi[taken] = 0;
    for (int i = 0; i < 4; i++) slo[taken] += longint'(term[i]);
    for (int i = 4; i < 8; i++) shi[taken] += longint'(term[i]);
    for (int i = 0; i < 8; i++) s8[taken] += longint'(term[i]);
    for (int i = 0; i < 6; i++) s6[taken] += longint'(term[i]);
    taken++;
  end

  always @(negedge clk) if (!rst && taken >= 3) begin
    checks += 2;
    if (longint'(sum[0]) !== s8[taken - 3]) begin
      failures++;
      $display("sum = %0d, expected %0d", sum[0], s8[taken - 3]);
    end
    if (longint'(sum6[0]) !== s6[taken - 3]) begin
      failures++;
      $display("sum6 = %0d, expected %0d", sum6[0], s6[taken - 3]);
    end
  end

  always @(negedge clk) if (!rst && taken >= 2) begin
    checks += 2;
    if (longint'(sum2[0]) !== slo[taken - 2] || longint'(sum2[1]) !== shi[taken - 2]) begin
      failures++;
      $display("sum2 = %0d %0d, expected %0d %0d", sum2[0], sum2[1],
               slo[taken - 2], shi[taken - 2]);
    end
  end

  initial begin
    rst = 1'b1; en = 1'b0;
    for (int i = 0; i < 8; i++) term[i] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      en = ($urandom % 6) != 0;
      for (int i = 0; i < 8; i++)
        case (n % 30)
          3: term[i] = {1'b1, {(TW-1){1'b0}}};
          4: term[i] = {1'b0, {(TW-1){1'b1}}};
          default: term[i] = TW'($urandom);
        endcase
    end
    @(negedge clk);
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
