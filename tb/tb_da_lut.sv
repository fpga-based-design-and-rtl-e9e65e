// tb_da_lut: reads every word of three table partitions (the first, one in
// the middle and the last, partly filled one) and compares it with the sum
// of the coefficients selected by the address bits, one cycle after the
// address is applied.
module tb_da_lut;
  import decim_pkg::*;
  localparam int AW = 4;
  localparam int DW = COEF_W + AW;
  logic clk = 1'b0;
  logic [AW-1:0] addr = '0;
  logic signed [DW-1:0] d0, d1, d2;
  int checks = 0, failures = 0;

  da_lut #(.ADDR_W(AW), .BASE(0),  .DW(DW)) u0 (.clk(clk), .addr(addr), .data(d0));
  da_lut #(.ADDR_W(AW), .BASE(20), .DW(DW)) u1 (.clk(clk), .addr(addr), .data(d1));
  da_lut #(.ADDR_W(AW), .BASE(48), .DW(DW)) u2 (.clk(clk), .addr(addr), .data(d2));

  always #5 clk = ~clk;

  function automatic longint expect_word(int base, int a);
    longint s = 0;
    for (int i = 0; i < AW; i++)
      if (a[i] && base + i < FIR_TAPS) s += longint'(FIR_COEF[base+i]);
    return s;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2 ** AW; a++) begin
      @(negedge clk);
      addr = AW'(a);
      @(posedge clk); #1;
      checks += 3;
      if (longint'(d0) != expect_word(0, a))  begin failures++; $display("FAIL base0 a=%0d %0d", a, d0); end
      if (longint'(d1) != expect_word(20, a)) begin failures++; $display("FAIL base20 a=%0d %0d", a, d1); end
      if (longint'(d2) != expect_word(48, a)) begin failures++; $display("FAIL base48 a=%0d %0d", a, d2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
