// Testbench for hilbert_feedback: clears the memory, then applies random
// read-modify-write updates and reads against a behavioural copy of the
// memory; reads have one clock latency, clear writes zero.
module tb_hilbert_feedback;
  localparam int N = 16, DATA_W = 26;
  logic clk = 0;
  logic rd_en = 0, upd_valid = 0, clr = 0;
  logic [$clog2(N)-1:0] rd_addr = '0, upd_addr = '0;
  logic signed [DATA_W-1:0] rd_data, upd_old = '0, upd_prod = '0;
  int checks = 0, failures = 0;
  logic signed [DATA_W-1:0] model [N];

  hilbert_feedback #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(int a);
    @(negedge clk);
    rd_en = 1; rd_addr = a[$clog2(N)-1:0];
    @(negedge clk);
    rd_en = 0;
    checks++;
    if (rd_data != model[a]) begin
      failures++; $display("addr %0d: read %0d expected %0d", a, rd_data, model[a]);
    end
  endtask

  initial begin
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      upd_valid = 1; clr = 1; upd_addr = a[$clog2(N)-1:0];
      upd_old = DATA_W'($urandom); upd_prod = DATA_W'($urandom);
      model[a] = '0;
    end
    @(negedge clk);
    upd_valid = 0; clr = 0;
    for (int a = 0; a < N; a++) read_check(a);
    for (int i = 0; i < 400; i++) begin
      int a;
      logic signed [DATA_W-1:0] o, p;
      a = $urandom_range(0, N - 1);
      o = DATA_W'($urandom); p = DATA_W'($urandom);
      @(negedge clk);
      upd_valid = 1; upd_addr = a[$clog2(N)-1:0]; upd_old = o; upd_prod = p;
      model[a] = o + p;
      @(negedge clk);
      upd_valid = 0;
      if (i % 3 == 0) read_check($urandom_range(0, N - 1));
    end
    for (int a = 0; a < N; a++) read_check(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
