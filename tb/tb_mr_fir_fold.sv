// tb_mr_fir_fold -- checks the generic fold with a configuration of its own.
//
// Two 4-tap filters decimated by 2 share one datapath with a fold period of 2
// (the pattern where consecutive outputs alternate between the two filters):
// y[a] = sum_m h_{a mod 2}[m] x[a - m] with h0 = [3, -5, 14, 15] and
// h1 = [-15, 7, 5, -12]. The seeds 3, 5, 7, 15 come from a recipe whose adders
// sit at two different depths, so the alignment of the scaling adders is
// exercised too, and two coefficients use a shift. One output register,
// output index = newest index: y[i] must appear after input i + 6 was taken.
//
// A second fold, dut2, is a pair of 4-tap interpolate-by-2 filters with
// parallel outputs (NOUT = 2), the tap-sharing pattern of an interpolating fold
// with period 2: the inputs of the two filters arrive in alternate clocks
// (u1 at even indices of the stream, u2 at odd ones), and in every clock the
// even taps serve one filter and the odd taps the other. Filter f sees its own
// input upsampled by 2 on its own parity: v_f[a] = sum_m g_f[m] z_f[a - m], with
// z_f[i] = x[i] where i mod 2 = f - 1 and 0 elsewhere, g1 = [3, 7, -5, 30] and
// g2 = [-7, 5, 15, -12]. Both outputs leave together, v[i] after input i + 5
// was taken.
module tb_mr_fir_fold;
  import mrf_pkg::*;

  localparam int XW = 10;
  localparam int H [2][4] = '{'{3, -5, 14, 15}, '{-15, 7, 5, -12}};

  // c0 = 2x + x = 3, c1 = 4x + x = 5, c2 = 8x - x = 7, c3 = 4*c0 + c0 = 15
  localparam recipe_t RCP = '{
    '{a_src: 3'd0, a_sh: 3'd1, a_neg: 1'b0, b_src: 3'd0, b_sh: 3'd0, b_neg: 1'b0},
    '{a_src: 3'd0, a_sh: 3'd2, a_neg: 1'b0, b_src: 3'd0, b_sh: 3'd0, b_neg: 1'b0},
    '{a_src: 3'd0, a_sh: 3'd3, a_neg: 1'b0, b_src: 3'd0, b_sh: 3'd0, b_neg: 1'b1},
    '{a_src: 3'd1, a_sh: 3'd2, a_neg: 1'b0, b_src: 3'd1, b_sh: 3'd0, b_neg: 1'b0}
  };

  // SEL[m][p]: tap m in phase p (filter p)
  localparam tap_sel_t [0:3][0:1] SEL = '{
    '{'{2'd0, 4'd0, 1'b0, 2'd0}, '{2'd3, 4'd0, 1'b1, 2'd0}},
    '{'{2'd1, 4'd1, 1'b1, 2'd0}, '{2'd2, 4'd1, 1'b0, 2'd0}},
    '{'{2'd2, 4'd2, 1'b0, 2'd1}, '{2'd1, 4'd2, 1'b0, 2'd0}},
    '{'{2'd3, 4'd3, 1'b0, 2'd0}, '{2'd0, 4'd3, 1'b1, 2'd2}}
  };

  localparam int G [2][4] = '{'{3, 7, -5, 30}, '{-7, 5, 15, -12}};

  // SEL2[t][p]: terms 0, 1 make v1 (taps p and p + 2), terms 2, 3 make v2
  // (taps 1 - p and 3 - p)
  localparam tap_sel_t [0:3][0:1] SEL2 = '{
    '{'{2'd0, 4'd0, 1'b0, 2'd0}, '{2'd2, 4'd1, 1'b0, 2'd0}},
    '{'{2'd1, 4'd2, 1'b1, 2'd0}, '{2'd3, 4'd3, 1'b0, 2'd1}},
    '{'{2'd1, 4'd1, 1'b0, 2'd0}, '{2'd2, 4'd0, 1'b1, 2'd0}},
    '{'{2'd0, 4'd3, 1'b1, 2'd2}, '{2'd3, 4'd2, 1'b0, 2'd0}}
  };

  logic clk = 1'b0, rst, en;
  logic signed [XW-1:0] x, x2;
  logic signed [XW+8:0] y [1];
  logic signed [XW+7:0] v [2];
  logic                 y_valid, v_valid;
  logic                 y_phase, v_phase;

  mr_fir_fold #(.XW(XW), .NTERM(4), .PHASES(2), .OUTR(1), .IDX_OFS(0),
                .RECIPE(RCP), .SEL(SEL)) dut (.*);
  mr_fir_fold #(.XW(XW), .NTERM(4), .PHASES(2), .OUTR(1), .IDX_OFS(0),
                .RECIPE(RCP), .SEL(SEL2), .NOUT(2)) dut2 (
    .clk, .rst, .en, .x(x2), .y(v), .y_valid(v_valid), .y_phase(v_phase)
  );
  always #5 clk = ~clk;

  int checks = 0, failures = 0, taken = 0, ny = 0, nv = 0, stalls = 0;
  longint xs [4096], x2s [4096];

  function automatic longint ref_v(int f, int a);
    longint acc;
    acc = 0;
    for (int m = 0; m < 4; m++)
      if (a - m >= 0 && (a - m) % 2 == f) acc += G[f][m] * x2s[a - m];
    return acc;
  endfunction

  function automatic longint ref_y(int a);
    longint acc;
    acc = 0;
    for (int m = 0; m < 4; m++)
      if (a - m >= 0) acc += H[a % 2][m] * xs[a - m];
    return acc;
  endfunction

  always @(posedge clk) if (!rst && en) begin
    xs[taken]  = longint'(x);
    x2s[taken] = longint'(x2);
    taken++;
  end

  always @(negedge clk) if (!rst && y_valid) begin
    checks += 3;
    if (longint'(y[0]) !== ref_y(ny)) begin
      failures++;
      $display("y[%0d] = %0d, expected %0d", ny, y[0], ref_y(ny));
    end
    if (y_phase !== 1'(ny % 2)) failures++;
    if (taken != ny + 6) begin
      failures++;
      $display("y[%0d] after %0d inputs", ny, taken);
    end
    ny++;
  end

  always @(negedge clk) if (!rst && v_valid) begin
    checks += 4;
    for (int f = 0; f < 2; f++)
      if (longint'(v[f]) !== ref_v(f, nv)) begin
        failures++;
        $display("v%0d[%0d] = %0d, expected %0d", f + 1, nv, v[f], ref_v(f, nv));
      end
    if (v_phase !== 1'(nv % 2)) failures++;
    if (taken != nv + 5) begin
      failures++;
      $display("v[%0d] after %0d inputs", nv, taken);
    end
    nv++;
  end

  initial begin
    rst = 1'b1; en = 1'b0; x = '0; x2 = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      en = ($urandom % 6) != 0;
      if (!en) stalls++;
      x = (n % 37 == 3) ? XW'(-(1 <<< (XW-1))) : XW'($urandom);
      x2 = (n % 41 == 7) ? XW'(-(1 <<< (XW-1))) : XW'($urandom);
    end
    @(negedge clk);
    checks += 3;
    if (ny < 300) failures++;
    if (nv < 300) failures++;
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
