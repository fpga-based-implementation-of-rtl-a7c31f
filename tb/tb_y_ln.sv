// Testbench for y_ln: random samples at irregular intervals; each Y must equal
// the aligned new sample minus the aligned sample from N samples earlier
// (zero during the first N samples), one cycle after the strobe.
module tb_y_ln;
  localparam int N = 8, IN_W = 20, DATA_W = 26, SIG_FRAC = 22;
  localparam int NS = 200;
  logic clk = 0, rst = 1, x_valid = 0;
  logic signed [IN_W-1:0] x_in = '0;
  logic y_valid;
  logic signed [DATA_W-1:0] y_out;
  int checks = 0, failures = 0;
  longint hist [$];

  y_ln #(.N(N), .IN_W(IN_W), .DATA_W(DATA_W), .SIG_FRAC(SIG_FRAC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < NS; s++) begin
      longint xe, xo, exp_y;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      x_in    <= IN_W'($urandom);
      if (s % 17 == 3) x_in <= {1'b1, {(IN_W-1){1'b0}}};   // most negative
      if (s % 17 == 9) x_in <= {1'b0, {(IN_W-1){1'b1}}};   // most positive
      x_valid <= 1;
      @(posedge clk);
      x_valid <= 0;
      xe = longint'(x_in) * (64'sd1 <<< (SIG_FRAC - IN_W + 1));
      hist.push_back(xe);
      xo = (hist.size() > N) ? hist[hist.size() - 1 - N] : 0;
      exp_y = xe - xo;
      #1;
      checks++;
      if (!y_valid || longint'(y_out) != exp_y) begin
        failures++;
        $display("sample %0d: y=%0d valid=%0b expected %0d", s, y_out, y_valid, exp_y);
      end
      @(posedge clk); #1;
      checks++;
      if (y_valid) begin failures++; $display("y_valid longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
