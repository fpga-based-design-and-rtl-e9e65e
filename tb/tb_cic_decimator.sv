// tb_cic_decimator: checks the 6-stage, R = 25 CIC decimator bit-exactly.
// The reference does not model integrators and combs: it convolves the
// +1/-1 input with g = (25-sample box)^*6, the CIC impulse response, and
// takes one output per 25 inputs. The structure delays the window by 6
// input samples (five integrator registers and the down-sampler register),
// so output j is sum_k g[k] * s[25*j + 18 - k], with s = 0 before reset.
// Input: random bits, then runs of ones and zeros to reach both full-scale
// values +/-25^6. Also checked: out_valid comes N+1 = 7 cycles after the
// enable that completes a group, and one output per 25 inputs.
module tb_cic_decimator;
  localparam int N = 6, R = 25, W = 29;
  localparam int GL = N * (R - 1) + 1;   // 145 taps
  localparam int NS = 25 * 400;          // input samples
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, xin = 1'b0;
  logic vld;
  logic signed [W-1:0] y;
  longint g [GL];
  int s [NS];
  int checks = 0, failures = 0, nout = 0, nsamp = 0, pos_fs = 0, neg_fs = 0;
  int last_group_cycle = -100, cyc = 0;

  cic_decimator #(.N(N), .R(R), .M(1), .W(W)) dut (
    .clk(clk), .rst(rst), .en(en), .xin(xin), .out_valid(vld), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_out(int j);
    longint acc;
    int n;
    acc = 0;
    for (int k = 0; k < GL; k++) begin
      n = 25 * j + 18 - k;
      if (n >= 0) acc += g[k] * longint'(s[n]);
    end
    return acc;
  endfunction

  // Impulse response of the cascade of six 25-sample moving sums.
  initial begin
    longint t [GL];
    for (int k = 0; k < GL; k++) g[k] = (k < R) ? 1 : 0;
    for (int st = 1; st < N; st++) begin
      for (int k = 0; k < GL; k++) begin
        t[k] = 0;
        for (int d = 0; d < R; d++) if (k - d >= 0) t[k] += g[k-d];
      end
      g = t;
    end
  end

  // Stimulus: one enable every 3 cycles.
  initial begin
    for (int n = 0; n < NS; n++) begin
      if (n < NS / 2)               s[n] = ($urandom % 2) ? 1 : -1;
      else if (n < NS / 2 + 25 * 50) s[n] = 1;
      else if (n < NS / 2 + 25 * 100) s[n] = -1;
      else                           s[n] = ($urandom % 4 == 0) ? -1 : 1;
    end
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      en = 1'b1; xin = (s[n] > 0);
      @(negedge clk);
      en = 1'b0;
      if (n % R == R - 1) last_group_cycle = cyc - 1;
      @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (nout != NS / R) begin failures++; $display("FAIL: %0d outputs, expected %0d", nout, NS / R); end
    checks++;
    if (pos_fs == 0 || neg_fs == 0) begin failures++; $display("FAIL: full scale not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (vld) begin
      longint r;
      r = ref_out(nout);
      checks++;
      if (longint'(y) != r) begin
        failures++;
        if (failures < 10) $display("FAIL out %0d: y=%0d ref=%0d", nout, y, r);
      end
      checks++;
      if (cyc - last_group_cycle != N + 1) begin
        failures++;
        $display("FAIL latency %0d", cyc - last_group_cycle);
      end
      if (y == W'(244140625))  pos_fs++;
      if (y == -W'(244140625)) neg_fs++;
      nout <= nout + 1;
    end
  end
endmodule
