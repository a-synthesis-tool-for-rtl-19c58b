// tb_synthesis_bank -- checks the folded synthesis filter bank.
//
// Random 22-bit band samples with stalls. Each output x_hat[n] is compared with
// the unfolded structure: the commutator sends y[4l + 3 - k] to band k, each band
// is upsampled by 4 and filtered by G_k, and the four filter outputs are summed
// through the delay chain x_hat[n] = w0[n] + w1[n-1] + w2[n-2] + w3[n-3].
// x_hat[n] must appear after band sample n + 9 was taken, and the product
// register chain must be no longer than a plain delay line and no shorter than
// the 28 products that are alive at once.
module tb_synthesis_bank;
  localparam int NY = 300;
  localparam int YW = 22;
  localparam int G [4][8] = '{
    '{  9,  25,  49,  61,  61,  49,  25,   9},
    '{-25, -61,  -9,  49, -49,   9,  61,  25},
    '{-49,   9,  61, -25, -25,  61,   9, -49},
    '{ 61, -49,  25,  -9,   9, -25,  49, -61}
  };

  logic clk = 1'b0, rst, y_valid;
  logic signed [YW-1:0] y;
  logic signed [31:0]   x_hat;
  logic                 x_valid;

  synthesis_bank dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, taken = 0, nr = 0, stalls = 0;
  longint ys [NY + 64];

  function automatic longint yin(int i);
    return (i < 0 || i >= taken) ? 0 : ys[i];
  endfunction

  function automatic longint up_band(int k, int n);
    if (n < 0 || (n % 4) != 0) return 0;
    return yin(n + 3 - k);
  endfunction

  function automatic longint ref_x(int n);
    longint acc;
    acc = 0;
    for (int k = 0; k < 4; k++)
      for (int m = 0; m < 8; m++)
        acc += G[k][m] * up_band(k, n - k - m);
    return acc;
  endfunction

  always @(posedge clk) if (!rst && y_valid) begin
    ys[taken] = longint'(y);
    taken++;
  end

  always @(negedge clk) if (!rst && x_valid) begin
    checks += 2;
    if (longint'(x_hat) !== ref_x(nr)) begin
      failures++;
      $display("x_hat[%0d] = %0d, expected %0d", nr, x_hat, ref_x(nr));
    end
    if (taken != nr + 9) begin
      failures++;
      $display("x_hat[%0d] after %0d band samples", nr, taken);
    end
    nr++;
  end

  initial begin
    rst = 1'b1; y_valid = 1'b0; y = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    while (taken < NY) begin
      @(negedge clk);
      y_valid = ($urandom % 7) != 0;
      if (!y_valid) stalls++;
      y = (taken % 29 == 4) ? YW'(-(1 <<< (YW-1))) : YW'($urandom);
    end
    @(negedge clk);
    y_valid = 1'b0;
    @(negedge clk);
    checks += 2;
    if (nr != taken - 8) begin failures++; $display("%0d outputs for %0d inputs", nr, taken); end
    if (stalls == 0) failures++;
    // the allocation must stay within the plain delay line (4 seeds x 10 ages)
    checks++;
    $display("synthesis product registers: %0d", dut.u_fold.NREG);
    if (dut.u_fold.NREG > 40 || dut.u_fold.NREG < 28) failures++;
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
