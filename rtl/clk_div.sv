// clk_div: derives the modulator (OSR) clock from the 4 MHz crystal clock.
//
// A free-running counter modulo DIV (64 by default, 4 MHz / 64 = 62.5 kHz)
// drives two outputs:
//   osr_clk - a 50 % duty square wave, the counter's upper half; it is the
//             clock sent out to the sigma-delta modulator.
//   osr_en  - a one-cycle pulse in the last count of every period, i.e. in
//             the clk cycle just before osr_clk falls. The rest of the filter
//             runs on clk and uses this pulse as its sample enable, so XIN is
//             sampled half an OSR period after the rising edge of osr_clk on
//             which the modulator changes it.
// The divide ratio follows the specification (4 MHz crystal, 62.5 kHz
// sampling); running the filter on one clock with enables instead of on the
// divided clocks is this design's choice. rst is asynchronous, active high.
module clk_div #(
  parameter int unsigned DIV = 64     // even, >= 2
) (
  input  logic clk,
  input  logic rst,
  output logic osr_clk,
  output logic osr_en
);

  localparam int unsigned CW = (DIV > 2) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                        cnt <= '0;
    else if (cnt == CW'(DIV - 1))   cnt <= '0;
    else                            cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) osr_clk <= 1'b0;
    else     osr_clk <= (cnt >= CW'(DIV/2 - 1)) && (cnt != CW'(DIV - 1));
  end

  assign osr_en = (cnt == CW'(DIV - 1));

  initial assert (DIV >= 2 && DIV % 2 == 0) else $error("clk_div: DIV must be even and >= 2");

endmodule
