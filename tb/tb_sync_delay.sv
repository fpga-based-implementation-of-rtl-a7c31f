// Testbench for sync_delay: random data shifted in at irregular enables; for
// random taps the output must be the value received addr+1 enables earlier
// (zero before that), one cycle after the enable.
module tb_sync_delay;
  localparam int DEPTH = 8, DATA_W = 26;
  logic clk = 0, rst = 1, en = 0;
  logic [$clog2(DEPTH)-1:0] addr = '0;
  logic signed [DATA_W-1:0] d = '0, q;
  int checks = 0, failures = 0;
  logic signed [DATA_W-1:0] hist [$];

  sync_delay #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 300; i++) begin
      int a;
      logic signed [DATA_W-1:0] e;
      repeat ($urandom_range(0, 2)) @(posedge clk);
      a = (i < 100) ? DEPTH - 1 : $urandom_range(0, DEPTH - 1);
      en <= 1; addr <= a[$clog2(DEPTH)-1:0]; d <= DATA_W'($urandom);
      @(posedge clk);
      en <= 0;
      e = (hist.size() > a) ? hist[hist.size() - 1 - a] : '0;
      hist.push_back(d);
      #1;
      checks++;
      if (q != e) begin failures++; $display("i=%0d addr=%0d q=%0d expected %0d", i, a, q, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
