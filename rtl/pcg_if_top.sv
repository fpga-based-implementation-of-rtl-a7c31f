// Instantaneous-frequency processor for phonocardiographic (PCG) signals.
//
// Chain: analytic signal (sliding-window Hilbert transform by the moving
// discrete Hartley transform recursion, window N) -> CORDIC phase ->
// phase unwrap -> central finite difference. For each input sample accepted
// on the x_valid/x_ready handshake the processor delivers one instantaneous
// frequency value (cycles per sample, Q1.25) on if_valid/if_out.
//
// Timing: the analytic-signal stage is busy for N/2 + 3 clocks per sample
// (67 clocks at N = 128), far below the clocks available between two codec
// samples (8 kHz). The frequency value that comes out belongs to the sample
// accepted N + 1 samples earlier (N for the window, 1 for the central
// difference); it appears ITER + 4 clocks after the accept that completes it.
// The wrap_up/wrap_down outputs flag phase-unwrap corrections and are meant
// for observation. The codec interface and its configuration are outside
// this module: it takes parallel samples.
module pcg_if_top
  import pcg_if_pkg::*;
#(
  parameter int N      = PCG_WIN_N,
  parameter int IN_W   = PCG_IN_W,
  parameter int DATA_W = PCG_DATA_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     x_valid,
  input  logic signed [IN_W-1:0]   x_in,
  output logic                     x_ready,
  output logic                     if_valid,
  output logic signed [DATA_W-1:0] if_out,
  output logic                     wrap_up,
  output logic                     wrap_down
);

  logic                     z_valid, ph_valid, uw_valid;
  logic signed [DATA_W-1:0] z_re, z_im, ph, uw;

  analytic_signal #(.N(N), .IN_W(IN_W), .DATA_W(DATA_W)) u_analytic (
    .clk     (clk),
    .rst     (rst),
    .x_valid (x_valid),
    .x_in    (x_in),
    .x_ready (x_ready),
    .z_valid (z_valid),
    .z_re    (z_re),
    .z_im    (z_im)
  );

  cordic_vectoring #(.DATA_W(DATA_W)) u_cordic (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (z_valid),
    .re        (z_re),
    .im        (z_im),
    .out_valid (ph_valid),
    .phase     (ph)
  );

  phase_unwrap #(.DATA_W(DATA_W)) u_unwrap (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (ph_valid),
    .phase_in  (ph),
    .out_valid (uw_valid),
    .phase_out (uw),
    .wrap_up   (wrap_up),
    .wrap_down (wrap_down)
  );

  if_cfd #(.DATA_W(DATA_W)) u_cfd (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (uw_valid),
    .phase     (uw),
    .out_valid (if_valid),
    .if_out    (if_out)
  );

endmodule
