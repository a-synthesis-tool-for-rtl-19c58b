// tb_recombination_chain -- checks the delay-and-add chain of the synthesis bank.
//
// A source model presents four random band-filter outputs w_k[i] per index i,
// full-scale values included, with the same valid protocol as the synthesis
// fold: zeros for i < 0 (the pipeline fill), a new index after every enabled
// clock and w_valid high for one clock per new valid index. Random stalls hold
// everything. Every x_hat[n] must equal w0[n] + w1[n-1] + w2[n-2] + w3[n-3]
// and appear one enabled clock after w[n] was presented; every index must come
// out exactly once.
module tb_recombination_chain;
  localparam int WW = 20;
  localparam int K  = 4;
  localparam int N  = 400;

  logic clk = 1'b0, rst, en;
  logic signed [WW-1:0] w [K];
  logic                 w_valid;
  logic signed [WW+1:0] x_hat;
  logic                 x_valid;

  recombination_chain #(.WW(WW), .K(K)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, stalls = 0, nx = 0;
  int idx;                      // index of the w presented now
  longint ws [K][N + 8];

  function automatic longint wv(int k, int i);
    return (i < 0) ? 0 : ws[k][i];
  endfunction

  function automatic longint ref_x(int n);
    longint acc;
    acc = 0;
    for (int k = 0; k < K; k++) acc += wv(k, n - k);
    return acc;
  endfunction

  // the source: a new index after every enabled clock
  always @(posedge clk) begin
    if (rst) begin
      idx = -3;
      w_valid <= 1'b0;
      for (int k = 0; k < K; k++) w[k] <= '0;
    end else if (en) begin
      idx++;
      for (int k = 0; k < K; k++) w[k] <= (idx < 0) ? '0 : WW'(ws[k][idx]);
      w_valid <= (idx >= 0);
    end else begin
      w_valid <= 1'b0;
    end
  end

  always @(negedge clk) if (!rst && x_valid) begin
    checks += 2;
    if (longint'(x_hat) !== ref_x(nx)) begin
      failures++;
      $display("x_hat[%0d] = %0d, expected %0d", nx, x_hat, ref_x(nx));
    end
    if (idx != nx + 1) begin
      failures++;
      $display("x_hat[%0d] while w[%0d] is presented", nx, idx);
    end
    nx++;
  end

  initial begin
    for (int i = 0; i < N + 8; i++)
      for (int k = 0; k < K; k++)
        case (i % 23)
          5:       ws[k][i] = -(longint'(1) <<< (WW - 1));
          6:       ws[k][i] = (longint'(1) <<< (WW - 1)) - 1;
          default: ws[k][i] = longint'($urandom % (1 << WW)) - (longint'(1) <<< (WW - 1));
        endcase
    rst = 1'b1; en = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    while (idx < N) begin
      @(negedge clk);
      en = ($urandom % 5) != 0;
      if (!en) stalls++;
    end
    @(negedge clk);
    en = 1'b0;
    repeat (2) @(negedge clk);
    checks += 2;
    if (nx != idx) begin failures++; $display("%0d outputs for %0d indices", nx, idx); end
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
