// decim_filter_top: two-stage decimation filter for a 1-bit sigma-delta
// accelerometer read-out.
//
// clk is the 4 MHz crystal clock. clk_div divides it by 64 into osr_clk
// (62.5 kHz), which is sent out to clock the modulator; xin is the
// modulator's bit stream at that rate. A 6-stage CIC decimator (R = 25)
// brings the rate down to 2.5 kHz; its 29-bit result is cut to the top 20
// bits (an arithmetic shift right by 9, full scale +/-476837) and fed to the
// 48th-order distributed-arithmetic FIR, which decimates by 4 to 625 Hz and
// gives the 20-bit output fir2_yout. Overall decimation is 100.
//
// Ports:
//   clk, rst    4 MHz clock; asynchronous reset, active high
//   xin         modulator bit, sampled one clk cycle before osr_clk falls
//   osr_clk     62.5 kHz modulator clock (50 % duty)
//   fir2_yout   20-bit filter output, held between updates
//   fir2_out    output indicator: one-cycle pulse when fir2_yout updates,
//               once every 6400 clk cycles
//   cic_yout    20-bit CIC output that enters the FIR, held between updates
//   cic_out     one-cycle pulse when cic_yout updates, every 1600 clk cycles
// The cic_yout/cic_out pair is brought out so the intermediate 2.5 kHz
// signal can be watched; the other ports follow the published interface.
// Latency: a CIC sample appears 7 clk cycles after the OSR enable that
// completes its group; the FIR result appears 23 clk cycles after the CIC
// sample that starts it. All of it runs on clk with sample enables; the
// FIR's 23-cycle computation fits easily in the 1600 cycles between inputs.
// The 9 low CIC bits and the FIR's busy flag are deliberately left unused.
module decim_filter_top
  import decim_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    xin,
  output logic                    osr_clk,
  output logic signed [OUT_W-1:0] fir2_yout,
  output logic                    fir2_out,
  output logic signed [FIR_IN_W-1:0] cic_yout,
  output logic                    cic_out
);

  logic                    osr_en;
  logic                    cic_valid;
  logic signed [CIC_W-1:0] cic_y;
  logic                    fir_busy;

  clk_div #(.DIV(OSR_DIV)) u_clk_div (
    .clk     (clk),
    .rst     (rst),
    .osr_clk (osr_clk),
    .osr_en  (osr_en)
  );

  cic_decimator #(.N(CIC_N), .R(CIC_R), .M(CIC_M), .W(CIC_W)) u_cic (
    .clk       (clk),
    .rst       (rst),
    .en        (osr_en),
    .xin       (xin),
    .out_valid (cic_valid),
    .y         (cic_y)
  );

  // Keep the top FIR_IN_W bits of the CIC result.
  logic signed [FIR_IN_W-1:0] fir_x;
  assign fir_x = cic_y[CIC_W-1 -: FIR_IN_W];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cic_yout <= '0;
      cic_out  <= 1'b0;
    end else begin
      cic_out <= cic_valid;
      if (cic_valid) cic_yout <= fir_x;
    end
  end

  fir_da #(
    .IN_W       (FIR_IN_W),
    .OUT_W      (OUT_W),
    .LUT_ADDR_W (4),
    .DECIM      (FIR_DECIM),
    .COEF_FRAC  (COEF_FRAC)
  ) u_fir (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (cic_valid),
    .x_in      (fir_x),
    .out_valid (fir2_out),
    .y_out     (fir2_yout),
    .busy      (fir_busy)
  );

endmodule
