// End-to-end testbench of pcg_if_top at its default parameters (window 128,
// 20-bit input, 26-bit data). It feeds a synthetic phonocardiogram of 17450
// samples (2.2 s at 8 kHz): per heart beat a first sound (decaying 35-60 Hz
// chirp), a second sound (decaying 70-90 Hz burst) and a weak systolic murmur
// (150-350 Hz), with silence between them. Samples are offered at random
// intervals around the processing time of one sample, so that some of them
// must wait for x_ready.
//
// The expected frequency is computed independently in floating point: the
// circular Hilbert transform of each 128-sample window evaluated directly,
// atan2, unwrap and the central difference. Outputs are compared where the
// analytic signal is strong enough for the phase to be meaningful (|z| above
// 0.02 for the samples the difference uses). Each output must come 26 clocks
// after the accept of the sample that completes it. The test also checks the
// clearing sweep after reset, the number of outputs, and that each mechanism
// happened: back-pressure, both kinds of unwrap correction, the reuse of the
// circular Hilbert memory, and vectors in the left half plane (CORDIC
// pre-rotation).
module tb_pcg_if_top;
  localparam int N = 128, IN_W = 20, DATA_W = 26;
  localparam int NS = 17450;
  localparam real FS = 8000.0;
  localparam real PI_R = 3.141592653589793;
  localparam real TOL = 2e-4;     // cycles per sample
  localparam real MAG_MIN = 0.02;

  logic clk = 0, rst = 1, x_valid = 0;
  logic signed [IN_W-1:0] x_in = '0;
  logic x_ready, if_valid, wrap_up, wrap_down;
  logic signed [DATA_W-1:0] if_out;

  int checks = 0, failures = 0;
  int n_wait = 0, n_up = 0, n_down = 0, n_left = 0, n_cmp = 0, n_if = 0;
  real xs [NS];
  real hk [N];
  real zre [NS], zim [NS], phu [NS];
  real max_err = 0.0;
  real sq_err = 0.0;
  int cycle = 0;
  int acc_cycle [$];
  localparam int LATENCY = 26;   // accept to IF output: 1 + (ITER+1) + 1 + 1

  pcg_if_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (!rst && x_valid && x_ready) acc_cycle.push_back(cycle);

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real pcg(int n);
    real t, tb, v, env;
    t  = n / FS;
    tb = t - 0.8 * $floor(t / 0.8);          // 75 beats per minute
    v  = 0.0;
    if (tb < 0.12) begin                       // first sound
      env = $exp(-tb / 0.03) * $sin(PI_R * tb / 0.12);
      v += 0.8 * env * $sin(2.0 * PI_R * (35.0 * tb + 0.5 * 210.0 * tb * tb));
    end
    if (tb >= 0.12 && tb < 0.30)               // systolic murmur
      v += 0.05 * $sin(PI_R * (tb - 0.12) / 0.18)
           * $sin(2.0 * PI_R * (150.0 * tb + 0.5 * 1100.0 * tb * tb));
    if (tb >= 0.32 && tb < 0.42) begin         // second sound
      env = $exp(-(tb - 0.32) / 0.025) * $sin(PI_R * (tb - 0.32) / 0.10);
      v += 0.6 * env * $sin(2.0 * PI_R * (70.0 * tb + 0.5 * 200.0 * (tb - 0.32) * (tb - 0.32)));
    end
    return v;
  endfunction

  // Reference chain in floating point.
  task automatic reference();
    real prev, corr;
    for (int d = 0; d < N; d++)
      hk[d] = (d % 2 == 1) ? (2.0 / N) * $cos(PI_R * d / N) / $sin(PI_R * d / N) : 0.0;
    prev = 0.0; corr = 0.0;
    for (int k = 0; k < NS; k++) begin
      // output k pairs x(k-N) with position 0 of the window x(k-N) .. x(k-1)
      real acc = 0.0;
      for (int m = 0; m < N; m++) begin
        int idx = k - N + m;
        if (idx >= 0) acc += hk[(N - m) % N] * xs[idx];
      end
      zre[k] = (k >= N) ? xs[k - N] : 0.0;
      zim[k] = acc;
      begin
        real p = $atan2(zim[k], zre[k]);
        if (p - prev > PI_R) corr -= 2.0 * PI_R;
        if (p - prev < -PI_R) corr += 2.0 * PI_R;
        prev = p;
        phu[k] = p + corr;
      end
    end
  endtask

  // Output checker: output j is the frequency of analytic sample j+1.
  always @(negedge clk) begin
    if (!rst) begin
      n_up   += int'(wrap_up);
      n_down += int'(wrap_down);
      if (if_valid) begin
        int j;
        real e, g, err;
        j = n_if;
        checks++;
        if (j + 2 >= acc_cycle.size() || cycle - acc_cycle[j + 2] != LATENCY) begin
          failures++;
          if (failures < 20) $display("IF %0d: latency %0d", j, cycle - acc_cycle[j + 2]);
        end
        n_if++;
        if (j + 2 < NS && $sqrt(zre[j]**2 + zim[j]**2) > MAG_MIN
            && $sqrt(zre[j+1]**2 + zim[j+1]**2) > MAG_MIN
            && $sqrt(zre[j+2]**2 + zim[j+2]**2) > MAG_MIN) begin
          e = (phu[j + 2] - phu[j]) / (4.0 * PI_R);
          g = real'(if_out) / (2.0 ** 25);
          err = (g > e) ? g - e : e - g;
          if (err > max_err) max_err = err;
          sq_err += err * err;
          checks++; n_cmp++;
          if (zre[j+1] < 0.0) n_left++;
          if (err > TOL) begin
            failures++;
            if (failures < 20) $display("IF %0d: %f expected %f", j, g, e);
          end
        end
      end
    end
  end

  initial begin
    for (int n = 0; n < NS; n++) begin
      logic signed [IN_W-1:0] q;
      q = IN_W'($rtoi(pcg(n) * (2.0 ** (IN_W - 1))));
      xs[n] = real'(q) / (2.0 ** (IN_W - 1));
    end
    reference();
    @(negedge clk); @(negedge clk);
    rst = 0;
    // After reset the Hilbert memory is cleared: N clocks without x_ready.
    for (int c = 0; c < N; c++) begin
      checks++;
      if (x_ready) begin failures++; $display("x_ready during the clearing sweep"); end
      @(negedge clk);
    end
    for (int n = 0; n < NS; n++) begin
      x_in = IN_W'($rtoi(xs[n] * (2.0 ** (IN_W - 1))));
      x_valid = 1; #1;
      while (!x_ready) begin n_wait++; @(negedge clk); #1; end
      @(negedge clk);
      x_valid = 0;
      repeat ($urandom_range(N / 2 - 8, N / 2 + 8)) @(negedge clk);
    end
    repeat (60) @(negedge clk);
    checks++;
    if (n_if != NS - 2) begin failures++; $display("%0d outputs for %0d samples", n_if, NS); end
    checks += 6;
    if (n_cmp < NS / 4) begin failures++; $display("only %0d outputs compared", n_cmp); end
    if (n_wait == 0) begin failures++; $display("back-pressure never happened"); end
    if (n_up == 0)   begin failures++; $display("no -2pi unwrap correction"); end
    if (n_down == 0) begin failures++; $display("no +2pi unwrap correction"); end
    if (NS < 2 * N)  begin failures++; $display("Hilbert memory never reused"); end
    if (n_left == 0) begin failures++; $display("no left-half-plane vector"); end
    $display("compared %0d of %0d outputs, max error %g, RMS error %g cycles/sample (%g Hz at 8 kHz)",
             n_cmp, n_if, max_err, $sqrt(sq_err / (n_cmp > 0 ? n_cmp : 1)), FS * $sqrt(sq_err / (n_cmp > 0 ? n_cmp : 1)));
    $display("waits %0d, unwrap -2pi %0d, +2pi %0d, left-half-plane %0d, memory passes %0d",
             n_wait, n_up, n_down, n_left, NS / N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
