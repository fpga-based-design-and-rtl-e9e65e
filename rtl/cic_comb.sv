// cic_comb: one comb section of a CIC decimator (differential delay M).
//
// Runs at the decimated rate. On every cycle with in_valid it stores x in an
// M-deep delay line and registers y = x - x[n-M]. out_valid follows one clk
// cycle later, so a cascade of comb sections forms a pipeline that adds one
// clk cycle, not one sample, of latency per section. Arithmetic is W-bit
// two's complement and wraps, like the integrators it follows.
// rst is asynchronous and clears the delay line, the output and out_valid.
module cic_comb #(
  parameter int unsigned W = 29,
  parameter int unsigned M = 1        // differential delay, >= 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output logic signed [W-1:0] y
);

  logic signed [W-1:0] dly [M];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < int'(M); i++) dly[i] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y      <= x - dly[M-1];
        dly[0] <= x;
        for (int i = 1; i < int'(M); i++) dly[i] <= dly[i-1];
      end
    end
  end

endmodule
