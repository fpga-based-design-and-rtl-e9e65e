// cic_integrator: one integrator section of a CIC filter.
//
// A single-pole IIR with unity feedback, i.e. an accumulator: on every
// enabled cycle y <= y + x. The sum wraps modulo 2^W; in a CIC decimator
// that wrap is harmless because the comb sections that follow take
// differences, and the final result fits in W bits (two's-complement
// arithmetic, as in Hogenauer's structure). Output y is the register itself,
// so a chain of integrators adds one sample of delay per section.
// rst is asynchronous and clears the accumulator.
module cic_integrator #(
  parameter int unsigned W = 29
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     y <= '0;
    else if (en) y <= y + x;
  end

endmodule
