// tb_fir_da: checks the distributed-arithmetic FIR against a direct-form
// multiply-accumulate model. Inputs arrive every 8 cycles. Three phases:
// random full-range 20-bit samples; a run of +/- full scale in the signs of
// the coefficients, which drives the exact result past the 20-bit range and
// must saturate the output (positive, then negative); and a random tail.
// For every output the model computes y = sum_k h[k] x[n-k] with the
// newest sample being the DECIM-th input, floor(y / 2^19), saturated.
// Also checked: one output per 4 inputs, IN_W + 3 = 23 cycles after the
// input that starts it.
module tb_fir_da;
  import decim_pkg::*;
  localparam int IN_W = FIR_IN_W;
  localparam int GAP  = 8;
  localparam int NIN  = 4 * 300;
  localparam longint YMAX = (64'sd1 <<< (OUT_W - 1)) - 1;
  localparam longint YMIN = -(64'sd1 <<< (OUT_W - 1));

  logic clk = 1'b0, rst = 1'b1, vin = 1'b0;
  logic signed [IN_W-1:0] x = '0;
  logic vout, busy;
  logic signed [OUT_W-1:0] y;
  longint hist [$];
  longint expq [$];
  int     start_cyc [$];
  int checks = 0, failures = 0, nout = 0, sat_pos = 0, sat_neg = 0, cyc = 0;

  fir_da dut (.clk(clk), .rst(rst), .in_valid(vin), .x_in(x),
              .out_valid(vout), .y_out(y), .busy(busy));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model();
    longint acc, q;
    acc = 0;
    for (int k = 0; k < FIR_TAPS; k++)
      if (hist.size() > k) acc += longint'(FIR_COEF[k]) * hist[hist.size() - 1 - k];
    q = acc >>> COEF_FRAC;
    if (q > YMAX) q = YMAX;
    if (q < YMIN) q = YMIN;
    return q;
  endfunction

  function automatic longint stim(int n);
    longint full;
    full = (64'sd1 <<< (IN_W - 1)) - 1;
    if (n >= 400 && n < 500)      return (FIR_COEF[n % FIR_TAPS] >= 0) ? full : -full - 1;
    else if (n >= 500 && n < 600) return (FIR_COEF[n % FIR_TAPS] >= 0) ? -full - 1 : full;
    else                          return longint'($signed(IN_W'($urandom)));
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < NIN; n++) begin
      @(negedge clk);
      vin = 1'b1;
      x   = IN_W'(stim(n));
      hist.push_back(longint'(x));
      if (n % FIR_DECIM == FIR_DECIM - 1) begin
        expq.push_back(model());
        start_cyc.push_back(cyc);
      end
      @(negedge clk);
      vin = 1'b0;
      repeat (GAP - 2) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    checks++;
    if (nout != NIN / FIR_DECIM) begin failures++; $display("FAIL: %0d outputs", nout); end
    checks++;
    if (sat_pos == 0 || sat_neg == 0) begin failures++; $display("FAIL: saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (vout) begin
      longint e;
      int s;
      checks += 2;
      if (expq.size() == 0) begin
        failures++; $display("FAIL: unexpected output");
      end else begin
        e = expq.pop_front();
        s = start_cyc.pop_front();
        if (longint'(y) != e) begin
          failures++;
          if (failures < 10) $display("FAIL out %0d: y=%0d expected %0d", nout, y, e);
        end
        if (cyc - s != IN_W + 3) begin
          failures++;
          $display("FAIL latency %0d", cyc - s);
        end
        if (e == YMAX) sat_pos++;
        if (e == YMIN) sat_neg++;
      end
      nout++;
    end
  end
endmodule
