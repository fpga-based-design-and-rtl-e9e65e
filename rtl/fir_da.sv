// fir_da: decimating FIR filter in improved (split-LUT) distributed arithmetic.
//
// The filter is y[n] = sum_k h[k] * x[n-k] over the 49 taps of
// decim_pkg::FIR_COEF, evaluated only for every DECIM-th input (decimation by
// 4 with no polyphase split). No multiplier is used. With x[n-k] written in
// two's complement as bits x_b, y = sum_b 2^b * P_b - 2^(B-1) * P_(B-1),
// where P_b = sum_k h[k] * x_b[n-k] is a table look-up addressed by bit b of
// every tap. The 49-bit address is split into ceil(49/LUT_ADDR_W) groups of
// LUT_ADDR_W bits, each served by its own small table (da_lut); the table
// outputs are added in a registered adder, and a shift-accumulator combines
// the bit planes, LSB first.
//
// Datapath, one stage per clk cycle:
//   1. the buffer stage: x_buf keeps the last 49 inputs. When a computation
//      starts, a working copy is taken and shifted right one bit per cycle,
//      so its LSBs are the current bit plane (the look-up address).
//   2. the split tables (registered read).
//   3. the adder that sums the table outputs (registered).
//   4. the accumulator: instead of shifting each P_b left by b (a barrel
//      shifter), it adds P_b at weight 2^(B-1) and shifts its own contents
//      right by one bit each cycle. After the B-th plane it holds
//      sum_b P_b 2^b exactly; the sign plane is subtracted.
// The result has COEF_FRAC fraction bits; the output is
// floor(acc / 2^COEF_FRAC) saturated to OUT_W bits.
//
// Interface and timing: x_in is taken when in_valid is high. On every
// DECIM-th accepted input (the 4th, 8th, ...) a computation starts on the
// 49 newest samples, that one included; out_valid pulses for one cycle
// IN_W + 3 cycles after that in_valid cycle and y_out holds the result
// until the next one. busy is high while a computation runs; a new one must
// not start before it ends, so inputs must be at least ceil((IN_W+3)/DECIM)
// cycles apart (1600 cycles in the full design). rst is asynchronous, active
// high.
//
// The DA scheme, the table splitting, the pipeline registers, order 48 and
// decimation by 4 follow the published design; the group size of 4, the
// word widths, truncation with saturation at the output and the coefficient
// values are this design's choices.
module fir_da #(
  parameter int unsigned IN_W       = decim_pkg::FIR_IN_W,
  parameter int unsigned OUT_W      = decim_pkg::OUT_W,
  parameter int unsigned LUT_ADDR_W = 4,
  parameter int unsigned DECIM      = decim_pkg::FIR_DECIM,
  parameter int unsigned COEF_FRAC  = decim_pkg::COEF_FRAC
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x_in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y_out,
  output logic                    busy
);

  import decim_pkg::*;

  localparam int unsigned TAPS   = FIR_TAPS;
  localparam int unsigned NLUT   = (TAPS + LUT_ADDR_W - 1) / LUT_ADDR_W;
  localparam int unsigned LUT_DW = COEF_W + LUT_ADDR_W;
  localparam int unsigned P_W    = COEF_W + $clog2(TAPS) + 1;  // holds sum |h|
  localparam int unsigned ACC_W  = P_W + IN_W;
  localparam int unsigned BW     = $clog2(IN_W);
  localparam int unsigned DW     = (DECIM > 1) ? $clog2(DECIM) : 1;

  // ---------------------------------------------------------------- buffer
  logic signed [IN_W-1:0] x_buf [TAPS];
  logic        [IN_W-1:0] work  [TAPS];
  logic        [DW-1:0]   dec_cnt;
  logic        [BW-1:0]   bit_cnt;
  logic                   start;

  assign start = in_valid && (dec_cnt == DW'(DECIM - 1));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int k = 0; k < int'(TAPS); k++) x_buf[k] <= '0;
      dec_cnt <= '0;
    end else if (in_valid) begin
      x_buf[0] <= x_in;
      for (int k = 1; k < int'(TAPS); k++) x_buf[k] <= x_buf[k-1];
      dec_cnt <= (dec_cnt == DW'(DECIM - 1)) ? '0 : dec_cnt + 1'b1;
    end
  end

  // Working copy: loaded with the new buffer contents, then shifted right.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int k = 0; k < int'(TAPS); k++) work[k] <= '0;
      busy    <= 1'b0;
      bit_cnt <= '0;
    end else if (start) begin
      work[0] <= x_in;
      for (int k = 1; k < int'(TAPS); k++) work[k] <= x_buf[k-1];
      busy    <= 1'b1;
      bit_cnt <= '0;
    end else if (busy) begin
      for (int k = 0; k < int'(TAPS); k++) work[k] <= work[k] >> 1;
      bit_cnt <= bit_cnt + 1'b1;
      if (bit_cnt == BW'(IN_W - 1)) busy <= 1'b0;
    end
  end

  // ---------------------------------------------------------- split tables
  logic signed [LUT_DW-1:0] lut_q [NLUT];

  for (genvar g = 0; g < int'(NLUT); g++) begin : g_lut
    logic [LUT_ADDR_W-1:0] addr;
    always_comb begin
      addr = '0;
      for (int i = 0; i < int'(LUT_ADDR_W); i++)
        if (g * LUT_ADDR_W + i < TAPS) addr[i] = work[g*LUT_ADDR_W+i][0];
    end
    da_lut #(.ADDR_W(LUT_ADDR_W), .BASE(g * LUT_ADDR_W), .DW(LUT_DW)) u_lut (
      .clk  (clk),
      .addr (addr),
      .data (lut_q[g])
    );
  end

  // Bit-plane tags travelling with the data through the pipeline.
  logic          t1_vld, t2_vld;
  logic [BW-1:0] t1_bit, t2_bit;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      t1_vld <= 1'b0;
      t2_vld <= 1'b0;
      t1_bit <= '0;
      t2_bit <= '0;
    end else begin
      t1_vld <= busy;
      t1_bit <= bit_cnt;
      t2_vld <= t1_vld;
      t2_bit <= t1_bit;
    end
  end

  // ------------------------------------------------------- table adder
  logic signed [P_W-1:0] p_sum, p_q;

  always_comb begin
    p_sum = '0;
    for (int g = 0; g < int'(NLUT); g++) p_sum += P_W'(lut_q[g]);
  end

  always_ff @(posedge clk) p_q <= p_sum;

  // ------------------------------------------------- shift-accumulator
  logic signed [ACC_W-1:0] acc, acc_next, p_weighted;
  logic signed [ACC_W-1:0] y_full;

  assign p_weighted = ACC_W'(p_q) <<< (IN_W - 1);

  always_comb begin
    if (t2_bit == '0)                 acc_next = p_weighted;
    else if (t2_bit == BW'(IN_W - 1)) acc_next = (acc >>> 1) - p_weighted;
    else                              acc_next = (acc >>> 1) + p_weighted;
  end

  assign y_full = acc_next >>> COEF_FRAC;

  localparam logic signed [ACC_W-1:0] Y_MAX = ACC_W'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] Y_MIN = -ACC_W'(64'sd1 <<< (OUT_W - 1));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      acc       <= '0;
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (t2_vld) begin
        acc <= acc_next;
        if (t2_bit == BW'(IN_W - 1)) begin
          out_valid <= 1'b1;
          if (y_full > Y_MAX)      y_out <= Y_MAX[OUT_W-1:0];
          else if (y_full < Y_MIN) y_out <= Y_MIN[OUT_W-1:0];
          else                     y_out <= y_full[OUT_W-1:0];
        end
      end
    end
  end

  // A new computation must not start while one is running.
  assert property (@(posedge clk) disable iff (rst) start |-> !busy)
    else $error("fir_da: input arrived too fast, computation overrun");

endmodule
