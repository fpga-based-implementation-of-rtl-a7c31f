// Phase of the analytic signal: fully parallel CORDIC in circular vectoring
// mode (rectangular to polar conversion, angle output).
//
// A pre-rotation by +-pi moves the vector into the right half plane (x >= 0)
// and preloads the angle accumulator with -+pi. Each of the ITER following
// stages rotates the vector by -+atan(2^-i) towards the x axis, choosing the
// direction from the sign of y, and accumulates the rotation angle, so that
// after the last stage z = atan2(im, re) in [-pi, pi]. The x/y datapath is two
// bits wider than the input to absorb the CORDIC gain (about 1.65) and the
// sqrt(2) growth, plus four guard fraction bits against truncation; the magnitude is not brought out. The arctangent table is
// computed at elaboration and rounded to PH_FRAC fraction bits.
//
// Interface: re/im in any common fixed-point format (only their ratio
// matters); phase in radians, DATA_W bits with PH_FRAC fraction bits.
// Timing: one stage per clock, one sample per clock, latency ITER+1 cycles
// from in_valid to out_valid. The reference design uses a fully parallel
// vendor CORDIC core in vectoring mode; the pre-rotation, word widths and
// iteration count here are this design's choices.
module cordic_vectoring
  import pcg_if_pkg::*;
#(
  parameter int DATA_W  = PCG_DATA_W,
  parameter int PH_FRAC = PCG_PH_FRAC,
  parameter int ITER    = PCG_CORDIC_ITER
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] re,
  input  logic signed [DATA_W-1:0] im,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] phase
);

  localparam int GUARD = 4;              // extra fraction bits against truncation
  localparam int XW    = DATA_W + 2 + GUARD;
  typedef logic signed [DATA_W-1:0] angle_t;
  typedef angle_t atan_table_t [ITER];

  function automatic atan_table_t make_atan();
    atan_table_t t;
    for (int i = 0; i < ITER; i++)
      t[i] = DATA_W'(round_real($atan(2.0 ** (-i)) * (2.0 ** PH_FRAC)));
    return t;
  endfunction

  localparam atan_table_t ATAN = make_atan();
  localparam angle_t      PI_Q = DATA_W'(round_real(PI * (2.0 ** PH_FRAC)));

  logic signed [XW-1:0] x [ITER+1];
  logic signed [XW-1:0] y [ITER+1];
  angle_t               z [ITER+1];
  logic                 v [ITER+1];

  // Stage 0: quadrant pre-rotation.
  always_ff @(posedge clk) begin
    if (rst) begin
      v[0] <= 1'b0;
      x[0] <= '0;
      y[0] <= '0;
      z[0] <= '0;
    end else begin
      v[0] <= in_valid;
      if (re < 0) begin
        x[0] <= -(XW'(re) <<< GUARD);
        y[0] <= -(XW'(im) <<< GUARD);
        z[0] <= (im >= 0) ? PI_Q : -PI_Q;
      end else begin
        x[0] <= XW'(re) <<< GUARD;
        y[0] <= XW'(im) <<< GUARD;
        z[0] <= '0;
      end
    end
  end

  // Stages 1..ITER: micro-rotations.
  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (rst) begin
        v[i+1] <= 1'b0;
        x[i+1] <= '0;
        y[i+1] <= '0;
        z[i+1] <= '0;
      end else begin
        v[i+1] <= v[i];
        if (y[i] >= 0) begin
          x[i+1] <= x[i] + (y[i] >>> i);
          y[i+1] <= y[i] - (x[i] >>> i);
          z[i+1] <= z[i] + ATAN[i];
        end else begin
          x[i+1] <= x[i] - (y[i] >>> i);
          y[i+1] <= y[i] + (x[i] >>> i);
          z[i+1] <= z[i] - ATAN[i];
        end
      end
    end
  end

  assign out_valid = v[ITER];
  assign phase     = z[ITER];

endmodule
