// tb_analysis_bank -- checks the folded analysis filter bank.
//
// Random 12-bit input with stalls. Each band sample y[i] is compared with the
// unfolded structure: G_k fed by x delayed k samples, decimated by 4, and the
// commutator placing band k at output index 4l + 3 - k. Also checked: y_band,
// and that y[i] appears after input i + 6 was taken (two output registers after
// a 3-stage scaling adder, the negator stage and a 3-level adder tree, less the
// 3-sample commutator lead). Every band must appear.
module tb_analysis_bank;
  localparam int NX = 300;
  localparam int XW = 12;
  localparam int G [4][8] = '{
    '{  9,  25,  49,  61,  61,  49,  25,   9},
    '{-25, -61,  -9,  49, -49,   9,  61,  25},
    '{-49,   9,  61, -25, -25,  61,   9, -49},
    '{ 61, -49,  25,  -9,   9, -25,  49, -61}
  };

  logic clk = 1'b0, rst, x_valid;
  logic signed [XW-1:0] x;
  logic signed [21:0]   y;
  logic                 y_valid;
  logic [1:0]           y_band;

  analysis_bank dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, taken = 0, ny = 0, stalls = 0;
  int band_seen [4] = '{0, 0, 0, 0};
  longint xs [NX + 64];

  function automatic longint xin(int i);
    return (i < 0 || i >= taken) ? 0 : xs[i];
  endfunction

  function automatic longint ref_y(int i);
    int l, k;
    longint acc;
    l = i / 4;
    k = 3 - (i % 4);
    acc = 0;
    for (int m = 0; m < 8; m++) acc += G[k][m] * xin(4*l - k - m);
    return acc;
  endfunction

  always @(posedge clk) if (!rst && x_valid) begin
    xs[taken] = longint'(x);
    taken++;
  end

  always @(negedge clk) if (!rst && y_valid) begin
    checks += 3;
    if (longint'(y) !== ref_y(ny)) begin
      failures++;
      $display("y[%0d] = %0d, expected %0d", ny, y, ref_y(ny));
    end
    if (y_band !== 2'(3 - ny % 4)) failures++;
    if (taken != ny + 6) begin
      failures++;
      $display("y[%0d] after %0d inputs", ny, taken);
    end
    band_seen[y_band]++;
    ny++;
  end

  initial begin
    rst = 1'b1; x_valid = 1'b0; x = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    while (taken < NX) begin
      @(negedge clk);
      x_valid = ($urandom % 7) != 0;
      if (!x_valid) stalls++;
      x = (taken % 41 == 5) ? XW'(-(1 <<< (XW-1))) : XW'($urandom);
    end
    @(negedge clk);
    x_valid = 1'b0;
    @(negedge clk);
    checks += 5;
    if (ny != taken - 5) begin failures++; $display("%0d outputs for %0d inputs", ny, taken); end
    if (stalls == 0) failures++;
    for (int k = 0; k < 4; k++) if (band_seen[k] == 0) failures++;
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
