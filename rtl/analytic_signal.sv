// Analytic-signal module: z(n) = x(n) + j H[x(n)].
//
// The imaginary part is the discrete Hilbert transform of the sliding
// N-sample window, computed with the recursion derived from the moving
// discrete Hartley transform (window shift L = 1, rectangular window):
//   Y(n)      = x_add - x_old                       (Y_Ln block)
//   x'(n, m)  = x'(n-1, m+1) + Y(n) * C(m),  m even (multiplier + feedback)
//   x'(n, m)  = x'(n-1, m+1),                m odd
//   C(m)      = (2/N) cot(pi (m+1) / N)             (cotangent ROM)
// The output imaginary part is position 0 of the window, the Hilbert value of
// the oldest sample of the window; the synchronization block delays the real
// part by the window size so that both parts belong to the same sample. The
// updates of one sample are done serially through a single multiplier under
// the control unit, N/2 + 3 clock cycles per sample.
//
// Interface: x_valid/x_ready handshake on the IN_W-bit input sample (a
// fraction in [-1, 1)); z_valid pulses for one cycle with z_re and z_im in
// Q(DATA_W-SIG_FRAC).SIG_FRAC format. Latency: z for the sample accepted N
// samples earlier appears one cycle after the accept of the current sample.
// Block structure and recursion follow the reference design; the fixed-point
// formats, the serial schedule and the handshake are this design's choices.
module analytic_signal
  import pcg_if_pkg::*;
#(
  parameter int N        = PCG_WIN_N,
  parameter int IN_W     = PCG_IN_W,
  parameter int DATA_W   = PCG_DATA_W,
  parameter int SIG_FRAC = PCG_SIG_FRAC
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     x_valid,
  input  logic signed [IN_W-1:0]   x_in,
  output logic                     x_ready,
  output logic                     z_valid,
  output logic signed [DATA_W-1:0] z_re,
  output logic signed [DATA_W-1:0] z_im
);

  localparam int AW = $clog2(N);
  localparam int KW = $clog2(N/2 > 1 ? N/2 : 2);

  logic                     accept;
  logic                     rd_en, out_strobe, op_valid, clr_valid;
  logic [AW-1:0]            rd_addr, op_addr, clr_addr;
  logic [KW-1:0]            op_k;
  logic                     y_valid;
  logic signed [DATA_W-1:0] y, x_ext, rd_data, prod;
  logic                     prod_valid;
  logic [AW-1:0]            addr_q1, addr_q2;
  logic signed [DATA_W-1:0] old_q;

  assign accept = x_valid && x_ready;
  assign x_ext  = DATA_W'(x_in) <<< (SIG_FRAC - (IN_W - 1));

  hilbert_ctrl #(.N(N)) u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .x_valid    (x_valid),
    .x_ready    (x_ready),
    .rd_en      (rd_en),
    .rd_addr    (rd_addr),
    .out_strobe (out_strobe),
    .op_valid   (op_valid),
    .op_k       (op_k),
    .op_addr    (op_addr),
    .clr_valid  (clr_valid),
    .clr_addr   (clr_addr)
  );

  y_ln #(.N(N), .IN_W(IN_W), .DATA_W(DATA_W), .SIG_FRAC(SIG_FRAC)) u_yln (
    .clk     (clk),
    .rst     (rst),
    .x_valid (accept),
    .x_in    (x_in),
    .y_valid (y_valid),
    .y_out   (y)
  );

  hilbert_mult #(.N(N), .DATA_W(DATA_W)) u_mult (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (op_valid),
    .k         (op_k),
    .y         (y),
    .out_valid (prod_valid),
    .prod      (prod)
  );

  // Align the memory read data and address with the two-cycle product.
  always_ff @(posedge clk) begin
    addr_q1 <= op_addr;
    addr_q2 <= addr_q1;
    old_q   <= rd_data;
  end

  hilbert_feedback #(.N(N), .DATA_W(DATA_W)) u_fb (
    .clk       (clk),
    .rd_en     (rd_en),
    .rd_addr   (rd_addr),
    .rd_data   (rd_data),
    .upd_valid (prod_valid || clr_valid),
    .clr       (clr_valid),
    .upd_addr  (clr_valid ? clr_addr : addr_q2),
    .upd_old   (old_q),
    .upd_prod  (prod)
  );

  sync_delay #(.DEPTH(N), .DATA_W(DATA_W)) u_sync (
    .clk  (clk),
    .rst  (rst),
    .en   (accept),
    .addr (AW'(N - 1)),
    .d    (x_ext),
    .q    (z_re)
  );

  always_ff @(posedge clk) begin
    if (rst) z_valid <= 1'b0;
    else     z_valid <= out_strobe;
  end

  assign z_im = rd_data;

  // A product is never written back while the memory is being cleared, and
  // Y is stable from the first issued update to the last.
  a_no_clr_collision: assert property (@(posedge clk) disable iff (rst)
    !(clr_valid && prod_valid));
  a_y_stable: assert property (@(posedge clk) disable iff (rst)
    op_valid |-> !y_valid || (op_k == '0));

endmodule
