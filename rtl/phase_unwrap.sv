// Phase unwrap: removes the 2*pi jumps of the CORDIC phase.
//
// The wrapped phase lies in [-pi, pi]. Whenever it jumps by more than pi
// between consecutive samples, a running correction is changed by -2*pi
// (jump up) or +2*pi (jump down), and the output is the input plus the
// correction, so the output phase is continuous. This is the behaviour of the
// usual unwrap function with a tolerance of pi.
//
// Words are DATA_W-bit radians with PH_FRAC fraction bits. The correction and
// the output are allowed to wrap around in two's complement: the following
// central difference only needs phase differences, which modular arithmetic
// keeps exact as long as they stay below half the word range.
//
// Timing: registered, out_valid/phase_out one cycle after in_valid; the first
// sample after reset passes unchanged (previous phase taken as 0).
// The unwrap rule follows the reference design, which evaluates it as
// combinational logic; the output register is this design's addition.
module phase_unwrap
  import pcg_if_pkg::*;
#(
  parameter int DATA_W  = PCG_DATA_W,
  parameter int PH_FRAC = PCG_PH_FRAC
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] phase_in,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] phase_out,
  output logic                     wrap_up,    // a -2*pi correction was applied
  output logic                     wrap_down   // a +2*pi correction was applied
);

  typedef logic signed [DATA_W-1:0] angle_t;
  localparam angle_t PI_Q     = DATA_W'(round_real(PI * (2.0 ** PH_FRAC)));
  localparam angle_t TWO_PI_Q = DATA_W'(round_real(2.0 * PI * (2.0 ** PH_FRAC)));

  angle_t             prev, corr, corr_next;
  logic signed [DATA_W:0] diff;
  logic               up, down;

  always_comb begin
    diff = (DATA_W+1)'(phase_in) - (DATA_W+1)'(prev);
    up   = diff >  (DATA_W+1)'(PI_Q);
    down = diff < -(DATA_W+1)'(PI_Q);
    corr_next = corr;
    if (up)   corr_next = corr - TWO_PI_Q;
    if (down) corr_next = corr + TWO_PI_Q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      prev      <= '0;
      corr      <= '0;
      out_valid <= 1'b0;
      phase_out <= '0;
      wrap_up   <= 1'b0;
      wrap_down <= 1'b0;
    end else begin
      out_valid <= in_valid;
      wrap_up   <= in_valid && up;
      wrap_down <= in_valid && down;
      if (in_valid) begin
        prev      <= phase_in;
        corr      <= corr_next;
        phase_out <= phase_in + corr_next;
      end
    end
  end

endmodule
