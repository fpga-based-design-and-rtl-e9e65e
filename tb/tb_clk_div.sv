// tb_clk_div: checks the OSR clock divider at its default ratio of 64.
// osr_clk must have a period of exactly DIV clk cycles with DIV/2 cycles
// high, and osr_en must be a single-cycle pulse in the last cycle of each
// osr_clk high phase (the cycle before osr_clk falls), once per period.
module tb_clk_div;
  localparam int DIV = 64;
  logic clk = 1'b0, rst = 1'b1;
  logic osr_clk, osr_en;
  int checks = 0, failures = 0;

  clk_div #(.DIV(DIV)) dut (.clk(clk), .rst(rst), .osr_clk(osr_clk), .osr_en(osr_en));

  always #125 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc = 0, last_rise = -1, last_fall = -1, en_cnt = 0, periods = 0;
    bit prev = 0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    check(osr_clk == 1'b0, "osr_clk low after reset");
    for (int i = 0; i < 20 * DIV; i++) begin
      @(posedge clk); #1;
      cyc++;
      if (osr_clk && !prev) begin
        if (last_rise >= 0) begin check(cyc - last_rise == DIV, "rise-to-rise period"); periods++; end
        last_rise = cyc;
      end
      if (!osr_clk && prev) begin
        if (last_rise >= 0) check(cyc - last_rise == DIV / 2, "high time");
        last_fall = cyc;
      end
      // osr_en (combinational, sampled here after the edge) announces the
      // falling edge at the next clk edge.
      if (osr_en) begin
        en_cnt++;
        check(osr_clk == 1'b1, "osr_en while osr_clk high");
      end
      prev = osr_clk;
    end
    check(en_cnt == 20, "one osr_en per period");
    check(periods >= 18, "enough periods seen");
    // osr_en must be followed by a falling edge of osr_clk one cycle later.
    for (int i = 0; i < 4 * DIV; i++) begin
      @(posedge clk); #1;
      if (osr_en) begin
        @(posedge clk); #1;
        check(osr_clk == 1'b0, "osr_clk falls right after osr_en");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
