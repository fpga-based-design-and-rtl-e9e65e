// tb_decim_filter_top: end-to-end sine test of the decimation filter at its
// default sizes (4 MHz clock, 62.5 kHz bit stream, 625 Hz output).
//
// A behavioural third-order single-bit delta-sigma modulator
// (sd_modulator3), clocked by the filter's own osr_clk, converts a 12.5 Hz sine of amplitude 0.5 full scale
// into the 1-bit xin stream. The testbench then predicts both stages from
// that bit stream alone:
//   CIC: output j = floor(sum_k g[k] s[25j + 18 - k] / 2^9), g being the
//        impulse response of six cascaded 25-sample moving sums and s the
//        +1/-1 bits (the structure's delay is 6 input samples);
//   FIR: a direct-form convolution of those CIC samples with the 49
//        coefficients, taken at every 4th CIC sample, floor(. / 2^19),
//        saturated to 20 bits.
// Every cic_out and fir2_out sample is compared bit-exactly, and their
// spacing must be 1600 and 6400 clk cycles. Over two signal periods the
// output must swing to about 0.5 * 476837 * |H(12.5 Hz)| and cross zero
// four times (50 output samples per period). The run counts each mechanism
// it exercises (OSR clock periods, CIC decimation, FIR decimation, negative
// results through the sign-bit subtraction, positive results) and fails if
// one never happened.
module tb_decim_filter_top;
  import decim_pkg::*;
  localparam int    NFIR  = 130;                  // FIR outputs to check
  localparam int    GL    = CIC_N * (CIC_R - 1) + 1;
  localparam real   PI    = 3.14159265358979;
  localparam real   AMP   = 0.5;
  localparam real   F_SIG = 12.5;
  localparam real   FS    = 62500.0;
  localparam longint YMAX = (64'sd1 <<< (OUT_W - 1)) - 1;
  localparam longint YMIN = -(64'sd1 <<< (OUT_W - 1));

  logic clk = 1'b0, rst = 1'b0, xin;
  logic osr_clk, fir2_out, cic_out;
  logic signed [OUT_W-1:0]    fir2_yout;
  logic signed [FIR_IN_W-1:0] cic_yout;

  decim_filter_top dut (
    .clk(clk), .rst(rst), .xin(xin), .osr_clk(osr_clk),
    .fir2_yout(fir2_yout), .fir2_out(fir2_out),
    .cic_yout(cic_yout), .cic_out(cic_out));

  always #125 clk = ~clk;   // 4 MHz

  int checks = 0, failures = 0;
  int n_osr = 0, n_cic = 0, n_fir = 0, n_absorbed = 0, n_neg = 0, n_pos = 0;
  int cyc = 0, last_cic = -1, last_fir = -1;
  longint g [GL];
  int     s [$];
  longint cic_ref [$];
  longint fir_out [$];

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s (cycle %0d)", msg, cyc);
  endtask

  initial begin
    repeat (NFIR * 6400 + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // CIC impulse response.
  initial begin
    longint t [GL];
    for (int k = 0; k < GL; k++) g[k] = (k < CIC_R) ? 1 : 0;
    for (int st = 1; st < CIC_N; st++) begin
      for (int k = 0; k < GL; k++) begin
        t[k] = 0;
        for (int d = 0; d < CIC_R; d++) if (k - d >= 0) t[k] += g[k-d];
      end
      g = t;
    end
  end

  // Behavioural third-order modulator; its bits are recorded when osr_clk
  // falls, the edge on which the filter samples them.
  sd_modulator3 #(.AMP(AMP), .F_SIG(F_SIG), .FS(FS)) u_mod (
    .osr_clk(osr_clk), .rst(rst), .xin(xin));

  always @(negedge osr_clk) if (!rst) begin
    s.push_back(xin ? 1 : -1);
    n_osr <= n_osr + 1;
  end

  function automatic longint cic_model(int j);
    longint acc;
    int n;
    acc = 0;
    for (int k = 0; k < GL; k++) begin
      n = CIC_R * j + 18 - k;
      if (n >= 0 && n < s.size()) acc += g[k] * longint'(s[n]);
    end
    return acc >>> (CIC_W - FIR_IN_W);
  endfunction

  function automatic longint fir_model(int j);   // newest CIC sample j
    longint acc, q;
    acc = 0;
    for (int k = 0; k < FIR_TAPS; k++)
      if (j - k >= 0) acc += longint'(FIR_COEF[k]) * cic_ref[j-k];
    q = acc >>> COEF_FRAC;
    if (q > YMAX) q = YMAX;
    if (q < YMIN) q = YMIN;
    return q;
  endfunction

  always @(posedge clk) begin
    longint e;
    cyc <= cyc + 1;
    if (!rst && cic_out) begin
      e = cic_model(n_cic);
      cic_ref.push_back(e);
      checks++;
      if (longint'(cic_yout) != e) fail($sformatf("cic %0d: %0d expected %0d", n_cic, cic_yout, e));
      if (last_cic >= 0) begin
        checks++;
        if (cyc - last_cic != OSR_DIV * CIC_R) fail("CIC output spacing");
      end
      last_cic <= cyc;
      if (n_cic % FIR_DECIM != FIR_DECIM - 1) n_absorbed++;
      n_cic <= n_cic + 1;
    end
    if (!rst && fir2_out) begin
      e = fir_model(FIR_DECIM * n_fir + FIR_DECIM - 1);
      checks++;
      if (longint'(fir2_yout) != e) fail($sformatf("fir %0d: %0d expected %0d", n_fir, fir2_yout, e));
      if (last_fir >= 0) begin
        checks++;
        if (cyc - last_fir != OSR_DIV * CIC_R * FIR_DECIM) fail("FIR output spacing");
      end
      last_fir <= cyc;
      fir_out.push_back(longint'(fir2_yout));
      if (fir2_yout < 0) n_neg++;
      if (fir2_yout > 0) n_pos++;
      n_fir <= n_fir + 1;
    end
  end

  // Gain of the quantised FIR at the test frequency (2.5 kHz input rate).
  function automatic real fir_gain(real f);
    real re, im;
    re = 0.0; im = 0.0;
    for (int k = 0; k < FIR_TAPS; k++) begin
      re += real'(FIR_COEF[k]) * $cos(2.0 * PI * f * k / 2500.0);
      im -= real'(FIR_COEF[k]) * $sin(2.0 * PI * f * k / 2500.0);
    end
    return $sqrt(re * re + im * im) / real'(64'sd1 <<< COEF_FRAC);
  endfunction

  initial begin
    real expect_amp, vmax, vmin;
    int crossings;
    #10 rst = 1'b1;                 // asynchronous reset pulse
    repeat (5) @(posedge clk);
    rst = 1'b0;
    wait (n_fir == NFIR);
    repeat (10) @(posedge clk);

    // Two full periods after the filters have filled.
    vmax = -1.0e9; vmin = 1.0e9; crossings = 0;
    for (int i = 30; i < 130; i++) begin
      if (real'(fir_out[i]) > vmax) vmax = real'(fir_out[i]);
      if (real'(fir_out[i]) < vmin) vmin = real'(fir_out[i]);
      if ((fir_out[i] >= 0) != (fir_out[i-1] >= 0)) crossings++;
    end
    expect_amp = AMP * 244140625.0 / 512.0 * fir_gain(F_SIG);
    $display("sine test: max %0.0f min %0.0f expected +/-%0.0f, %0d zero crossings",
             vmax, vmin, expect_amp, crossings);
    checks += 3;
    if (vmax < 0.95 * expect_amp || vmax > 1.05 * expect_amp) fail("positive peak");
    if (-vmin < 0.95 * expect_amp || -vmin > 1.05 * expect_amp) fail("negative peak");
    if (crossings != 4) fail("zero crossings");

    $display("mechanisms: osr periods %0d, cic samples %0d, absorbed by FIR decimation %0d, fir outputs %0d, negative %0d, positive %0d",
             n_osr, n_cic, n_absorbed, n_fir, n_neg, n_pos);
    checks += 6;
    if (n_osr == 0)      fail("OSR clock never ran");
    if (n_cic == 0)      fail("no CIC output");
    if (n_absorbed == 0) fail("FIR decimation never dropped a sample");
    if (n_fir == 0)      fail("no FIR output");
    if (n_neg == 0)      fail("no negative output");
    if (n_pos == 0)      fail("no positive output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
