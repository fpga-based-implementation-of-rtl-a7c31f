// Testbench for cordic_vectoring: random vectors in all four quadrants (and
// the axes), one per clock, with magnitudes from 1/64 to the full Q4.22
// range; each phase must lie in [-pi, pi] and match atan2(im, re) within
// 1e-5 rad (modulo 2*pi on the negative real axis) and arrive ITER+1 clocks after its input.
module tb_cordic_vectoring;
  localparam int DATA_W = 26, PH_FRAC = 22, ITER = 22;
  localparam real PI_R = 3.141592653589793;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [DATA_W-1:0] re = '0, im = '0;
  logic out_valid;
  logic signed [DATA_W-1:0] phase;
  int checks = 0, failures = 0, cycle = 0;
  real exp_q [$];
  int  cyc_q [$];
  int  quad [4];

  cordic_vectoring dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      real e, g, err;
      int c0;
      e = exp_q.pop_front();
      c0 = cyc_q.pop_front();
      g = real'(phase) / (2.0 ** PH_FRAC);
      err = g - e;
      if (err > PI_R) err -= 2.0 * PI_R;
      if (err < -PI_R) err += 2.0 * PI_R;
      checks += 3;
      // The unwrap stage relies on the principal range [-pi, pi].
      if (g > PI_R + 1e-5 || g < -PI_R - 1e-5) begin failures++; $display("phase %f out of range", g); end
      if (err > 1e-5 || err < -1e-5) begin failures++; $display("phase %f expected %f", g, e); end
      if (cycle - c0 != ITER + 1) begin failures++; $display("latency %0d", cycle - c0); end
    end
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      real mag, ang, fr, fi;
      int e2;
      e2 = $urandom_range(0, 9);
      mag = (2.0 ** (e2 - 6)) * (1.0 + $urandom_range(0, 1000) / 1000.0);
      if (mag > 7.9) mag = 7.9;
      ang = (i < 8) ? (i * PI_R / 4.0 - PI_R + 1e-9) : ($urandom_range(0, 100000) / 100000.0 * 2.0 - 1.0) * PI_R;
      fr = mag * $cos(ang) * (2.0 ** PH_FRAC);
      fi = mag * $sin(ang) * (2.0 ** PH_FRAC);
      re = DATA_W'($rtoi(fr)); im = DATA_W'($rtoi(fi));
      in_valid = 1;
      quad[(re < 0 ? 2 : 0) + (im < 0 ? 1 : 0)]++;
      exp_q.push_back($atan2(real'(im), real'(re)));
      cyc_q.push_back(cycle);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (ITER + 4) @(negedge clk);
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (quad[q] == 0) begin failures++; $display("quadrant %0d never tested", q); end
    end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
