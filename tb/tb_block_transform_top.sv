// tb_block_transform_top -- end-to-end test of the four-band block transform.
//
// Streams random 12-bit samples through analysis and synthesis at the default
// sizes, with random one-clock stalls (x_valid = 0). Every band sample y[i] and
// every reconstructed sample x_hat[n] is compared with a direct, unfolded model
// of the filter bank: four 8-tap filters with delays, decimators, upsamplers and
// commutators, written from the block diagram with its own integer coefficient
// table. Latencies are checked in enabled clocks: y[i] must appear after input
// i + 6 was taken, x_hat[n] after band sample n + 9 was taken. Mechanisms
// counted: stalls, each of the four bands at the output, and wraps of the fold
// period; a mechanism that never happens is a failure.
module tb_block_transform_top;

  localparam int NX   = 400;          // input samples
  localparam int XW   = 12;
  localparam int YW   = 22;
  localparam int RW   = 32;

  // G_k[m], in units of 2^-7
  localparam int G [4][8] = '{
    '{  9,  25,  49,  61,  61,  49,  25,   9},
    '{-25, -61,  -9,  49, -49,   9,  61,  25},
    '{-49,   9,  61, -25, -25,  61,   9, -49},
    '{ 61, -49,  25,  -9,   9, -25,  49, -61}
  };

  logic                 clk = 1'b0;
  logic                 rst;
  logic                 x_valid;
  logic signed [XW-1:0] x;
  logic signed [YW-1:0] y;
  logic                 y_valid;
  logic [1:0]           y_band;
  logic signed [RW-1:0] x_hat;
  logic                 x_hat_valid;

  block_transform_top dut (.*);

  always #5 clk = ~clk;

  longint xs [NX];
  longint ys [NX+16];
  int     checks = 0, failures = 0;
  int     taken_x = 0, taken_y = 0, ny = 0, nr = 0;
  int     stalls = 0, band_seen [4] = '{0, 0, 0, 0}, wraps = 0;

  function automatic longint xin(int i);
    return (i < 0 || i >= NX) ? 0 : xs[i];
  endfunction

  // analysis: y[4l+3-k] = (G_k * x delayed by k)[4l]
  function automatic longint ref_y(int i);
    int l, k;
    longint acc;
    l = i / 4;
    k = 3 - (i % 4);
    acc = 0;
    for (int m = 0; m < 8; m++) acc += G[k][m] * xin(4*l - k - m);
    return acc;
  endfunction

  function automatic longint yin(int i);
    return (i < 0) ? 0 : ys[i];
  endfunction

  // band k after the commutator and the upsampler, at time n
  function automatic longint up_band(int k, int n);
    if (n < 0 || (n % 4) != 0) return 0;
    return yin(n + 3 - k);
  endfunction

  // synthesis: x_hat[n] = sum_k (G_k * up_band k)[n - k]
  function automatic longint ref_xhat(int n);
    longint acc;
    acc = 0;
    for (int k = 0; k < 4; k++)
      for (int m = 0; m < 8; m++)
        acc += G[k][m] * up_band(k, n - k - m);
    return acc;
  endfunction

  always @(posedge clk) begin
    if (!rst && x_valid) taken_x++;
    if (!rst && y_valid) taken_y++;
  end

  // monitor, mid-cycle
  always @(negedge clk) begin
    if (!rst && y_valid) begin
      if (ny < NX + 16) ys[ny] = longint'(y);
      checks++;
      if (longint'(y) !== ref_y(ny)) begin
        failures++;
        $display("y[%0d] = %0d, expected %0d", ny, y, ref_y(ny));
      end
      checks++;
      if (y_band !== 2'(3 - (ny % 4))) begin
        failures++;
        $display("y[%0d] band %0d, expected %0d", ny, y_band, 3 - (ny % 4));
      end
      checks++;
      if (taken_x != ny + 6) begin
        failures++;
        $display("y[%0d] after %0d inputs, expected %0d", ny, taken_x, ny + 6);
      end
      band_seen[y_band]++;
      if (ny % 4 == 3) wraps++;
      ny++;
    end
    if (!rst && x_hat_valid) begin
      checks++;
      if (longint'(x_hat) !== ref_xhat(nr)) begin
        failures++;
        $display("x_hat[%0d] = %0d, expected %0d", nr, x_hat, ref_xhat(nr));
      end
      checks++;
      if (taken_y != nr + 9) begin
        failures++;
        $display("x_hat[%0d] after %0d band samples, expected %0d", nr, taken_y, nr + 9);
      end
      nr++;
    end
  end

  initial begin
    for (int i = 0; i < NX; i++) begin
      xs[i] = longint'($signed(XW'($urandom)));
      if (i % 50 == 7)  xs[i] = -(1 <<< (XW-1));       // full-scale negative
      if (i % 50 == 21) xs[i] = (1 <<< (XW-1)) - 1;    // full-scale positive
    end
    rst = 1'b1; x_valid = 1'b0; x = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // stream all samples, then zeros to flush
    for (int i = 0; i < NX + 40; ) begin
      @(negedge clk);
      if (($urandom % 8) == 0) begin
        x_valid = 1'b0;
        x = XW'($urandom);
        stalls++;
      end else begin
        x_valid = 1'b1;
        x = XW'(xin(i));
        i++;
      end
    end
    @(negedge clk);
    x_valid = 1'b0;
    repeat (5) @(negedge clk);

    checks++;
    if (ny < NX) begin failures++; $display("only %0d band samples", ny); end
    checks++;
    if (nr < NX) begin failures++; $display("only %0d output samples", nr); end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall happened"); end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (band_seen[k] == 0) begin failures++; $display("band %0d never seen", k); end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("fold period never wrapped"); end
    $display("stalls=%0d bands=%0d/%0d/%0d/%0d wraps=%0d y=%0d x_hat=%0d",
             stalls, band_seen[0], band_seen[1], band_seen[2], band_seen[3], wraps, ny, nr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
