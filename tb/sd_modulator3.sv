// sd_modulator3: behavioural (non-synthesizable) model of a third-order
// single-bit sigma-delta modulator, used only as a test stimulus for the
// decimation filter. It stands in for the analog modulator of the
// accelerometer front end and does not model its circuit.
//
// On each rising edge of osr_clk it takes the next sample of the test
// signal u = AMP * sin(2*pi*F_SIG*n/FS) and emits one bit. The model is an
// error-feedback loop with noise transfer function
//     NTF(z) = (1 - z^-1)^3 / D(z),
// D(z) being the denominator of a third-order Butterworth high-pass with
// cutoff 0.04 * (FS/2), which keeps the peak noise gain at about 1.13 so the
// single-bit loop stays stable for |u| up to well above 0.5. With
// e = y - v the quantisation error, v = u + ((NTF - 1) e), so that
// Y = U + NTF * E: the error is pushed out of the 100 Hz signal band.
// Output xin = 1 stands for +1, 0 for -1; it changes after each rising edge
// of osr_clk. Reset clears the loop state.
module sd_modulator3 #(
  parameter real AMP   = 0.5,
  parameter real F_SIG = 12.5,
  parameter real FS    = 62500.0
) (
  input  logic osr_clk,
  input  logic rst,
  output logic xin
);
  localparam real PI = 3.14159265358979;
  // D(z) = 1 + D1 z^-1 + D2 z^-2 + D3 z^-3 and N(z) - D(z) = C1 z^-1 + ...
  localparam real D1 = -2.74883581, D2 = 2.52823122, D3 = -0.77763856;
  localparam real C1 = -0.25116419, C2 = 0.47176878, C3 = -0.22236144;

  real e1, e2, e3, w1, w2, w3;
  int  n;

  initial begin
    e1 = 0.0; e2 = 0.0; e3 = 0.0; w1 = 0.0; w2 = 0.0; w3 = 0.0;
    n = 0;
    xin = 1'b0;
  end

  always @(posedge osr_clk or posedge rst) begin
    real u, w, v, y;
    if (rst) begin
      e1 = 0.0; e2 = 0.0; e3 = 0.0; w1 = 0.0; w2 = 0.0; w3 = 0.0;
      n = 0;
      xin <= 1'b0;
    end else begin
      u = AMP * $sin(2.0 * PI * F_SIG * real'(n) / FS);
      w = C1 * e1 + C2 * e2 + C3 * e3 - D1 * w1 - D2 * w2 - D3 * w3;
      v = u + w;
      y = (v >= 0.0) ? 1.0 : -1.0;
      e3 = e2; e2 = e1; e1 = y - v;
      w3 = w2; w2 = w1; w1 = w;
      n++;
      xin <= (y > 0.0);
    end
  end
endmodule
