// tb_decim_step: step response of the whole decimation filter at its
// default sizes. xin is held at 0 (-1 full scale) until the output has
// settled, then switched to 1 (+1 full scale). The CIC then delivers
// -/+ 25^6 / 2^9 = -/+476837 to the FIR, whose DC gain is 524287 / 2^19, so
// the settled outputs must be floor(floor(-25^6 / 2^9) * 524287 / 2^19) =
// -476838 and floor(476837 * 524287 / 2^19) = 476836. The output must start to move in
// the first output after the step and must have reached the new value
// within (145 / 25 + 49) / 4 + 2 = 16 outputs (the two impulse-response
// lengths at the 625 Hz output rate). The overshoot caused by the pass-band
// ripple (about 9 % of the 953674 step) goes past the 20-bit range, so the
// output must clip at +524287; the negative early coefficients first pull
// it below the old level, where it must clip at -524288. Between
// consecutive outputs it may never jump by more than 750000 (a wrap-around
// would jump by about 2^20).
module tb_decim_step;
  import decim_pkg::*;
  logic clk = 1'b0, rst = 1'b0, xin = 1'b0;
  logic osr_clk, fir2_out, cic_out;
  logic signed [OUT_W-1:0]    fir2_yout;
  logic signed [FIR_IN_W-1:0] cic_yout;
  int checks = 0, failures = 0, n_fir = 0;
  longint hist [$];

  decim_filter_top dut (
    .clk(clk), .rst(rst), .xin(xin), .osr_clk(osr_clk),
    .fir2_yout(fir2_yout), .fir2_out(fir2_out),
    .cic_yout(cic_yout), .cic_out(cic_out));

  always #125 clk = ~clk;

  always @(posedge clk) if (!rst && fir2_out) begin
    hist.push_back(longint'(fir2_yout));
    n_fir <= n_fir + 1;
  end

  initial begin
    repeat (70 * 6400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int step_at, settled;
    longint peak, trough;
    #10 rst = 1'b1;
    repeat (5) @(posedge clk);
    rst = 1'b0;
    wait (n_fir == 30);
    checks++;
    if (hist[29] != -476838) begin failures++; $display("FAIL: low level %0d", hist[29]); end
    @(negedge osr_clk);
    @(posedge osr_clk);
    xin = 1'b1;
    step_at = n_fir;
    wait (n_fir == step_at + 30);
    checks++;
    if (hist[step_at + 29] != 476836) begin failures++; $display("FAIL: high level %0d", hist[step_at + 29]); end
    checks++;
    if (hist[step_at] == -476838 && hist[step_at + 1] == -476838) begin
      failures++; $display("FAIL: output did not move after the step");
    end
    settled = -1; peak = 0; trough = 0;
    for (int i = step_at + 2; i < step_at + 30; i++) begin
      checks++;
      if (hist[i] - hist[i-1] > 750000 || hist[i-1] - hist[i] > 750000) begin
        failures++; $display("FAIL: jump at %0d: %0d -> %0d", i, hist[i-1], hist[i]);
      end
    end
    for (int i = step_at; i < step_at + 30; i++) begin
      if (hist[i] > peak) peak = hist[i];
      if (hist[i] < trough) trough = hist[i];
      if (settled < 0 && hist[i] >= 476836 - 5000) settled = i - step_at;
    end
    $display("step: reached within 1%% after %0d outputs, peak %0d, trough %0d", settled, peak, trough);
    checks += 3;
    if (trough != -524288) begin failures++; $display("FAIL: expected undershoot clipping at -524288"); end
    if (settled < 0 || settled > 16) begin failures++; $display("FAIL: settling"); end
    if (peak != 524287) begin failures++; $display("FAIL: expected clipping at 524287"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
