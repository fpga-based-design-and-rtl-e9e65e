// cic_decimator: N-section CIC decimation filter (Hogenauer structure).
//
// Input is the single-bit modulator stream, read as +1 (bit = 1) or -1
// (bit = 0), one sample per cycle with en high (62.5 kHz in this design).
// N integrator sections run at that input rate; a down-sampler between them
// and the comb sections keeps one sample in every R; N comb sections with
// differential delay M then run at the low rate. Placing the down-sampler
// between the integrators and the combs is what keeps the combs' delay lines
// short and their clock rate low.
//
// The transfer function is H(z) = ((1 - z^-RM) / (1 - z^-1))^N with DC gain
// (RM)^N = 25^6 = 244140625 for the default N = 6, R = 25, M = 1, so the W =
// 29-bit registers hold the full-precision result (Eq. (2) bit growth:
// N*log2(RM) + Bin). Integrator sums wrap; the wrap cancels in the combs.
//
// Timing: out_valid pulses for one clk cycle once every R enabled input
// samples, N + 1 clk cycles after the en cycle that completed the group.
// The section counts, R, M and the width follow the specification; the
// +1/-1 reading of the input bit and the pipelining are this design's
// choices. rst is asynchronous, active high.
module cic_decimator #(
  parameter int unsigned N = 6,
  parameter int unsigned R = 25,
  parameter int unsigned M = 1,
  parameter int unsigned W = 29
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,        // one input sample
  input  logic                xin,       // modulator bit
  output logic                out_valid, // one decimated sample
  output logic signed [W-1:0] y
);

  localparam int unsigned PW = (R > 1) ? $clog2(R) : 1;

  // Integrator chain.
  logic signed [W-1:0] integ [N+1];
  assign integ[0] = xin ? W'(1) : -W'(1);

  for (genvar s = 0; s < int'(N); s++) begin : g_int
    cic_integrator #(.W(W)) u_int (
      .clk (clk),
      .rst (rst),
      .en  (en),
      .x   (integ[s]),
      .y   (integ[s+1])
    );
  end

  // Down-sampler: one sample out of every R.
  logic [PW-1:0]       phase;
  logic                ds_valid;
  logic signed [W-1:0] ds_sample;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      phase     <= '0;
      ds_valid  <= 1'b0;
      ds_sample <= '0;
    end else begin
      ds_valid <= 1'b0;
      if (en) begin
        if (phase == PW'(R - 1)) begin
          phase     <= '0;
          ds_valid  <= 1'b1;
          ds_sample <= integ[N];
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

  // Comb chain at the decimated rate.
  logic signed [W-1:0] comb  [N+1];
  logic                cvld  [N+1];
  assign comb[0] = ds_sample;
  assign cvld[0] = ds_valid;

  for (genvar s = 0; s < int'(N); s++) begin : g_comb
    cic_comb #(.W(W), .M(M)) u_comb (
      .clk       (clk),
      .rst       (rst),
      .in_valid  (cvld[s]),
      .x         (comb[s]),
      .out_valid (cvld[s+1]),
      .y         (comb[s+1])
    );
  end

  assign y         = comb[N];
  assign out_valid = cvld[N];

endmodule
