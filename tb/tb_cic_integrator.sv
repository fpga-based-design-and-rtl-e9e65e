// tb_cic_integrator: drives one integrator with random samples and a random
// enable and compares it every cycle with an accumulator model kept modulo
// 2^W; also runs it long enough with a large input to make the sum wrap.
module tb_cic_integrator;
  localparam int W = 29;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic signed [W-1:0] x = '0, y;
  longint ref_sum = 0;
  int checks = 0, failures = 0, wraps = 0;

  cic_integrator #(.W(W)) dut (.clk(clk), .rst(rst), .en(en), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      en = ($urandom % 3) != 0;
      if (i < 2000) x = W'($signed($urandom % 2001) - 1000);
      else          x = W'(28'sd100000000);     // forces wrap-around
      @(posedge clk); #1;
      if (en) begin
        longint prev;
        prev = ref_sum;
        ref_sum = ref_sum + longint'(x);
        ref_sum = longint'($signed(W'(ref_sum)));  // keep modulo 2^W
        if ((prev > 0 && x > 0 && ref_sum < 0)) wraps++;
      end
      checks++;
      if (y != W'(ref_sum)) begin
        failures++;
        $display("FAIL i=%0d y=%0d ref=%0d", i, y, ref_sum);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL: no wrap happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
