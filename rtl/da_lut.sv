// da_lut: one partition of the split distributed-arithmetic look-up table.
//
// In distributed arithmetic a filter output is built bit plane by bit plane:
// bit b of every stored input sample forms an address, and the table returns
// the sum of the coefficients whose sample has a 1 in that bit. One table
// over all 49 taps would need 2^49 words; splitting the taps into groups of
// ADDR_W (4 by default) gives 13 tables of 16 words whose results are added.
// This module is one such table: it serves taps BASE .. BASE+ADDR_W-1, and
// address bit i stands for tap BASE+i. Word a holds
//     sum over i with a[i] = 1 and BASE+i < FIR_TAPS of FIR_COEF[BASE+i],
// so the last, partly filled group simply ignores its unused address bits.
// The contents are computed from decim_pkg::FIR_COEF at elaboration.
//
// Timing: the read is registered (the pipeline register after the tables),
// so data is valid one clk cycle after addr. No reset: the register only
// carries data that the controller tags as valid.
module da_lut #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned BASE   = 0,
  parameter int unsigned DW     = decim_pkg::COEF_W + ADDR_W
) (
  input  logic                 clk,
  input  logic [ADDR_W-1:0]    addr,
  output logic signed [DW-1:0] data
);

  import decim_pkg::*;

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  typedef logic signed [DW-1:0] word_t;

  function automatic word_t entry(int unsigned a);
    word_t s = '0;
    for (int unsigned i = 0; i < ADDR_W; i++)
      if (((a >> i) & 1) == 1 && BASE + i < FIR_TAPS)
        s += word_t'(FIR_COEF[BASE+i]);
    return s;
  endfunction

  typedef word_t table_t [DEPTH];

  function automatic table_t build();
    table_t t;
    for (int unsigned a = 0; a < DEPTH; a++) t[a] = entry(a);
    return t;
  endfunction

  localparam table_t ROM = build();

  always_ff @(posedge clk) data <= ROM[addr];

endmodule
