// Testbench for cot_rom: every word at the default window size is compared
// with (2/N)/tan(pi(2k+1)/N) computed here in floating point (within one LSB),
// and the read is checked to be registered (one clock of latency).
module tb_cot_rom;
  localparam int N = 128, COEF_W = 26, COEF_FRAC = 25;
  logic clk = 0;
  logic [$clog2(N/2)-1:0] addr = '0;
  logic signed [COEF_W-1:0] data, d0;
  int checks = 0, failures = 0;

  cot_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N/2; k++) begin
      real expv, got;
      addr <= k[$clog2(N/2)-1:0];
      @(posedge clk); #1;
      expv = (2.0 / N) / $tan(3.141592653589793 * (2 * k + 1) / N);
      got  = real'(data) / (2.0 ** COEF_FRAC);
      checks++;
      if ((got - expv) > 1.0 / (2.0 ** COEF_FRAC) || (expv - got) > 1.0 / (2.0 ** COEF_FRAC)) begin
        failures++;
        $display("k=%0d got %f expected %f", k, got, expv);
      end
    end
    // The output must not follow a new address before the clock edge.
    addr <= 0; @(posedge clk); #1;
    d0 = data;
    addr <= 5; #1;
    checks++;
    if (data != d0) begin failures++; $display("read is not registered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
