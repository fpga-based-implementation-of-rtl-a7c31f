// Testbench for if_cfd: a random phase sequence (Q4.22 radians, wrapping in
// the 26-bit word like the unwrapped phase does) is fed in; every output must
// equal (phi(n+1) - phi(n-1)) / (4 pi) in cycles per sample within one LSB of
// the Q1.25 result, appear one clock after phi(n+1), and the first two inputs
// must produce no output.
module tb_if_cfd;
  localparam int DATA_W = 26, PH_FRAC = 22, IF_FRAC = 25;
  localparam real PI_R = 3.141592653589793;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [DATA_W-1:0] phase = '0, if_out;
  logic out_valid;
  int checks = 0, failures = 0;
  longint ph [$];

  if_cfd dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint cur = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      longint step, d;
      real e, g;
      // Steps up to +-pi: the sum of two steps stays within +-2 pi.
      step = longint'($urandom_range(0, 2 * 13176794)) - 13176794;
      cur = cur + step;
      ph.push_back(cur);
      phase = DATA_W'(cur);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (i < 2) begin
        if (out_valid) begin failures++; $display("output before the delay line filled"); end
      end else begin
        d = ph[i] - ph[i - 2];
        e = real'(d) / (2.0 ** PH_FRAC) / (4.0 * PI_R);
        g = real'(if_out) / (2.0 ** IF_FRAC);
        if (!out_valid || g - e > 1.5 / (2.0 ** IF_FRAC) || e - g > 1.5 / (2.0 ** IF_FRAC)) begin
          failures++; $display("i=%0d IF %f expected %f valid %0b", i, g, e, out_valid);
        end
      end
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        checks++;
        if (out_valid) begin failures++; $display("output without input"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
