// Testbench for hilbert_ctrl (N = 16): checks the clearing sweep after reset
// (every address exactly once, x_ready low for N clocks), and for each sample
// the output read of the previous window's position 0, the N/2 updates at
// addresses base+2k with k = 0..N/2-1 in consecutive clocks, and the busy time
// of N/2 + 3 clocks before x_ready returns. Samples are offered both while the
// unit is still draining (they must wait, with no accept strobe) and after
// idle gaps.
module tb_hilbert_ctrl;
  localparam int N = 16, AW = $clog2(N), KW = $clog2(N/2);
  logic clk = 0, rst = 1, x_valid = 0;
  logic x_ready, rd_en, out_strobe, op_valid, clr_valid;
  logic [AW-1:0] rd_addr, op_addr, clr_addr;
  logic [KW-1:0] op_k;
  int checks = 0, failures = 0;
  int clr_seen [N];
  int base_model = 0;
  int n_early_waits = 0;
  bit early;

  hilbert_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    chk(n_early_waits > 0, "a sample never waited for x_ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("%0t: %s", $time, msg); end
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    // Clearing sweep.
    for (int c = 0; c < N; c++) begin
      chk(clr_valid && !x_ready, "clear sweep expected");
      if (clr_valid) clr_seen[clr_addr]++;
      @(negedge clk);
    end
    for (int a = 0; a < N; a++) chk(clr_seen[a] == 1, $sformatf("address %0d cleared %0d times", a, clr_seen[a]));
    chk(x_ready && !clr_valid, "idle after sweep");
    for (int s = 0; s < 40; s++) begin
      int busy;
      // Offer the sample; if the unit is busy it must wait.
      x_valid = 1; #1;
      while (!x_ready) begin chk(!out_strobe, "strobe while busy"); @(negedge clk); #1; end
      chk(out_strobe && rd_en && rd_addr == AW'(base_model), "output read of position 0");
      @(negedge clk);
      x_valid = 0;
      base_model = (base_model + 1) % N;
      for (int k = 0; k < N/2; k++) begin
        chk(op_valid && op_k == KW'(k) && op_addr == AW'((base_model + 2 * k) % N)
            && rd_en && rd_addr == op_addr && !x_ready, $sformatf("update k=%0d", k));
        @(negedge clk);
      end
      busy = 1 + N/2;
      // Sometimes offer the next sample already during the drain: it must wait.
      early = ($urandom_range(0, 1) == 1);
      if (early) begin x_valid = 1; #1; end
      while (!x_ready) begin
        chk(!op_valid && !out_strobe, "no update or accept during drain");
        if (early) n_early_waits++;
        busy++; @(negedge clk);
      end
      chk(busy == N/2 + 3, $sformatf("busy %0d clocks", busy));
      // Either offer the next sample at once or after a gap; sometimes
      // raise x_valid early, during the next busy period.
      if (!early) repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    chk(n_early_waits > 0, "a sample never waited for x_ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
