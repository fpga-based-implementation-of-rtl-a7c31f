// Testbench for hilbert_mult: a stream of random (y, k) operations, one per
// clock; each product must equal y * (2/N) cot(pi(2k+1)/N) within two LSBs
// (coefficient rounding plus product rounding) and arrive exactly two clocks
// after the edge that samples its operation (the checker looks at the
// falling edge, three counts after the issue count was recorded).
module tb_hilbert_mult;
  localparam int N = 16, DATA_W = 26, SIG_FRAC = 22;
  localparam int NOPS = 300;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [$clog2(N/2)-1:0] k = '0;
  logic signed [DATA_W-1:0] y = '0;
  logic out_valid;
  logic signed [DATA_W-1:0] prod;
  int checks = 0, failures = 0;
  real exp_q [$];
  int  issue_cycle [$];
  int  cycle = 0;

  hilbert_mult #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker.
  always @(negedge clk) begin
    if (!rst && out_valid) begin
      real e, got;
      int  c0;
      e  = exp_q.pop_front();
      c0 = issue_cycle.pop_front();
      got = real'(prod) / (2.0 ** SIG_FRAC);
      checks++;
      if ((got - e) > 2.0 / (2.0 ** SIG_FRAC) || (e - got) > 2.0 / (2.0 ** SIG_FRAC)) begin
        failures++;
        $display("prod %f expected %f", got, e);
      end
      checks++;
      if (cycle - c0 != 3) begin failures++; $display("latency %0d", cycle - c0); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < NOPS; i++) begin
      int kk;
      logic signed [DATA_W-1:0] yy;
      kk = $urandom_range(0, N/2 - 1);
      yy = DATA_W'($signed($urandom_range(0, 2**24)) - 2**23) <<< ($urandom_range(0, 1));
      if (i == 5) yy = DATA_W'(-(2 ** (SIG_FRAC + 1)));   // Y = -2.0, the extreme
      if ($urandom_range(0, 4) == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
      in_valid <= 1; k <= kk[$clog2(N/2)-1:0]; y <= yy;
      exp_q.push_back(real'(yy) / (2.0 ** SIG_FRAC) * (2.0 / N) / $tan(3.141592653589793 * (2 * kk + 1) / N));
      issue_cycle.push_back(cycle);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    if (exp_q.size() != 0) begin failures++; $display("%0d products missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
