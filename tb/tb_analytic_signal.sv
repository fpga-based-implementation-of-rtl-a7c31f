// Testbench for analytic_signal (N = 16). Random and sinusoidal samples are
// offered with random gaps, sometimes while the module is still busy (the
// sample must wait for x_ready). For every output the real part must be the
// sample accepted N samples earlier (exact), and the imaginary part must match
// the circular discrete Hilbert transform of that window, evaluated directly
// here as sum_m (2/N) cot(pi d/N) x(m) over odd lags d = -m mod N, within a
// small rounding tolerance. z_valid must come one clock after each accept.
module tb_analytic_signal;
  localparam int N = 16, IN_W = 20, DATA_W = 26, SIG_FRAC = 22;
  localparam int NS = 600;
  localparam real PI_R = 3.141592653589793;
  localparam real TOL = 64.0 / (2.0 ** SIG_FRAC);
  logic clk = 0, rst = 1, x_valid = 0;
  logic signed [IN_W-1:0] x_in = '0;
  logic x_ready, z_valid;
  logic signed [DATA_W-1:0] z_re, z_im;
  int checks = 0, failures = 0, waits = 0;
  real xs [$];           // accepted samples as real numbers
  longint xq [$];        // accepted samples, aligned integers
  int n_out = 0;
  int accept_cycle = -10, cycle = 0;
  real max_err = 0.0;

  analytic_signal #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real hilbert0(int t);
    // position 0 of the window x(t-N) .. x(t-1)
    real acc = 0.0;
    for (int m = 0; m < N; m++) begin
      int d = (N - m) % N;
      int idx = t - N + m;
      real xv = (idx >= 0) ? xs[idx] : 0.0;
      if (d % 2 == 1) acc += (2.0 / N) * $cos(PI_R * d / N) / $sin(PI_R * d / N) * xv;
    end
    return acc;
  endfunction

  // Output checker, sampled at the falling edge.
  always @(negedge clk) begin
    if (!rst && z_valid) begin
      longint er;
      real ei, gi, err;
      er = (n_out >= N) ? xq[n_out - N] : 0;
      ei = hilbert0(n_out);
      gi = real'(z_im) / (2.0 ** SIG_FRAC);
      err = (gi > ei) ? gi - ei : ei - gi;
      if (err > max_err) max_err = err;
      checks += 3;
      if (longint'(z_re) != er) begin failures++; $display("out %0d: re %0d expected %0d", n_out, z_re, er); end
      if (err > TOL) begin failures++; $display("out %0d: im %f expected %f", n_out, gi, ei); end
      if (cycle != accept_cycle + 1) begin failures++; $display("out %0d: latency", n_out); end
      n_out++;
    end
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int s = 0; s < NS; s++) begin
      logic signed [IN_W-1:0] v;
      if (s < NS / 2) v = IN_W'($urandom);
      else v = IN_W'($rtoi(0.7 * (2.0 ** (IN_W - 1)) * $cos(2.0 * PI_R * 3.0 * s / N + 0.3)));
      x_in = v; x_valid = 1; #1;
      while (!x_ready) begin waits++; @(negedge clk); #1; end
      @(posedge clk);
      accept_cycle = cycle;
      xs.push_back(real'(v) / (2.0 ** (IN_W - 1)));
      xq.push_back(longint'(v) * (64'sd1 <<< (SIG_FRAC - IN_W + 1)));
      @(negedge clk);
      x_valid = 0;
      // Gap: none (next sample waits for ready) or up to 3 * N clocks.
      if ($urandom_range(0, 1) == 1) repeat ($urandom_range(0, 3 * N)) @(negedge clk);
    end
    repeat (N) @(negedge clk);
    checks++;
    if (n_out != NS) begin failures++; $display("%0d outputs for %0d samples", n_out, NS); end
    checks++;
    if (waits == 0) begin failures++; $display("back-pressure never exercised"); end
    $display("max |im error| = %g, samples that waited: %0d", max_err, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
