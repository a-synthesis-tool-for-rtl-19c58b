// tb_scaling_adders -- checks the seed products of the scaling adders.
//
// Feeds random and full-scale samples, one per clock with random stalls, and
// checks that prod[j] = c_j * x with c = 9, 25, 49, 61 (the default recipe)
// exactly LAT = 3 enabled clocks after x was taken in, and that a stall holds
// the outputs.
module tb_scaling_adders;
  import mrf_pkg::*;

  localparam int XW = X_BITS;
  localparam int PW = X_BITS + COEF_BITS - 1;
  localparam int C [4] = '{9, 25, 49, 61};
  localparam int LAT = 3;

  logic clk = 1'b0, rst, en;
  logic signed [XW-1:0] x;
  logic signed [PW-1:0] prod [NSEEDS];

  scaling_adders dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, taken = 0, stalls = 0;
  longint hist [1024];

  always @(posedge clk) if (!rst && en) begin
    hist[taken] = longint'(x);
    taken++;
  end

  always @(negedge clk) if (!rst && taken >= LAT) begin
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (longint'(prod[j]) !== C[j] * hist[taken - LAT]) begin
        failures++;
        $display("prod[%0d] = %0d for x[%0d] = %0d", j, prod[j], taken - LAT, hist[taken - LAT]);
      end
    end
  end

  initial begin
    rst = 1'b1; en = 1'b0; x = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      en = ($urandom % 5) != 0;
      if (!en) stalls++;
      case (i % 40)
        5:  x = -(1 <<< (XW-1));
        6:  x = (1 <<< (XW-1)) - 1;
        default: x = XW'($urandom);
      endcase
    end
    @(negedge clk);
    checks++;
    if (stalls == 0) failures++;
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
