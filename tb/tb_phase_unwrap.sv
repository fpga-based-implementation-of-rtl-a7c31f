// Testbench for phase_unwrap: a wrapped phase sequence is produced from a
// random true phase walk (steps below pi, both directions); the unwrapped
// output must equal the true phase plus the first sample's offset, compared
// modulo the 2^DATA_W word range since the output is allowed to wrap. Both
// kinds of correction must occur and be flagged, and the output must come
// one clock after the input.
module tb_phase_unwrap;
  localparam int DATA_W = 26, PH_FRAC = 22;
  localparam real PI_R = 3.141592653589793;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [DATA_W-1:0] phase_in = '0, phase_out;
  logic out_valid, wrap_up, wrap_down;
  int checks = 0, failures = 0, n_up = 0, n_down = 0, n_exp_up = 0, n_exp_down = 0;
  real truth = 0.0;
  int  pending = 0;
  real exp_unw;

  phase_unwrap dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real wrap_pi(real a);
    return a - 2.0 * PI_R * $floor((a + PI_R) / (2.0 * PI_R));
  endfunction

  initial begin
    real prev_w = 0.0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    truth = 0.5;
    for (int i = 0; i < 5000; i++) begin
      real w, step, d;
      int jit;
      longint gi, ei, diff;
      // Frequency drifts slowly between -0.45 and +0.45 cycles per sample.
      jit = $urandom_range(0, 100);
      step = 2.0 * PI_R * 0.45 * $sin(i / 300.0) + (jit - 50) / 1000.0;
      if (i > 0) truth += step;
      w = wrap_pi(truth);
      d = w - prev_w;
      if (i > 0 && d > PI_R) n_exp_up++;
      if (i > 0 && d < -PI_R) n_exp_down++;
      prev_w = w;
      phase_in = DATA_W'($rtoi(w * (2.0 ** PH_FRAC)));
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      // The quantised output minus the quantised truth, modulo the word range.
      gi = longint'(phase_out);
      ei = longint'(truth * (2.0 ** PH_FRAC));
      diff = (gi - ei) % (64'sd1 <<< DATA_W);
      if (diff >= (64'sd1 <<< (DATA_W - 1))) diff -= (64'sd1 <<< DATA_W);
      if (diff < -(64'sd1 <<< (DATA_W - 1))) diff += (64'sd1 <<< DATA_W);
      checks += 2;
      if (!out_valid) begin failures++; $display("no output for sample %0d", i); end
      // Allowance: the rounding of 2*pi accumulates one LSB per correction.
      if (diff > 4 + n_up + n_down || diff < -(4 + n_up + n_down)) begin
        failures++; if (failures < 10) $display("sample %0d: unwrapped %0d expected %0d", i, gi, ei);
      end
      n_up += wrap_up; n_down += wrap_down;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    checks += 2;
    if (n_up != n_exp_up || n_down != n_exp_down) begin
      failures++; $display("corrections %0d/%0d expected %0d/%0d", n_up, n_down, n_exp_up, n_exp_down);
    end
    if (n_up == 0 || n_down == 0) begin failures++; $display("a correction kind never happened"); end
    $display("corrections: -2pi %0d, +2pi %0d", n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
