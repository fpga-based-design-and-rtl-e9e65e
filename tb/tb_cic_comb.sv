// tb_cic_comb: checks comb sections with M = 1 and M = 2. Random samples
// arrive with a random valid; each output must equal x[n] - x[n-M] over the
// valid samples (zero before reset history) and appear one cycle later.
module tb_cic_comb;
  localparam int W = 29;
  logic clk = 1'b0, rst = 1'b1, vin = 1'b0;
  logic signed [W-1:0] x = '0, y1, y2;
  logic v1, v2;
  longint hist [$];
  int checks = 0, failures = 0;

  cic_comb #(.W(W), .M(1)) dut1 (.clk(clk), .rst(rst), .in_valid(vin), .x(x), .out_valid(v1), .y(y1));
  cic_comb #(.W(W), .M(2)) dut2 (.clk(clk), .rst(rst), .in_valid(vin), .x(x), .out_valid(v2), .y(y2));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint past(int d);
    return (hist.size() > d) ? hist[hist.size() - 1 - d] : 0;
  endfunction

  initial begin
    hist = {};
    repeat (2) @(posedge clk);
    rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      bit was_valid;
      @(negedge clk);
      vin = $urandom % 2;
      x   = W'($signed($urandom % 200001) - 100000);
      was_valid = vin;
      if (vin) hist.push_back(longint'(x));
      @(posedge clk); #1;
      checks += 2;
      if (v1 != was_valid || v2 != was_valid) begin
        failures++; $display("FAIL valid i=%0d", i);
      end
      if (was_valid) begin
        checks += 2;
        if (y1 != W'(past(0) - past(1))) begin failures++; $display("FAIL M=1 i=%0d", i); end
        if (y2 != W'(past(0) - past(2))) begin failures++; $display("FAIL M=2 i=%0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
