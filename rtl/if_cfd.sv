// Instantaneous frequency by central finite difference:
//   IF(n) = (phi(n+1) - phi(n-1)) / (4*pi)
//
// Two delay registers hold phi(n) and phi(n-1); when phi(n+1) arrives the
// subtractor forms the difference (in DATA_W-bit modular arithmetic, which is
// exact for the unwrapped phase even after it wraps) and a multiplier by the
// constant 1/(4*pi) scales it. The result is the frequency of sample n in
// cycles per sample, in [-0.5, 0.5], DATA_W bits with IF_FRAC fraction bits;
// multiply by the sample rate for hertz.
//
// Timing: out_valid pulses one cycle after the in_valid that delivers
// phi(n+1); the first two samples after reset only fill the delay line.
// Delay elements, subtractor and constant multiplier follow the reference
// design; the rounding and the output scaling are this design's choices.
module if_cfd
  import pcg_if_pkg::*;
#(
  parameter int DATA_W  = PCG_DATA_W,
  parameter int PH_FRAC = PCG_PH_FRAC,
  parameter int IF_FRAC = PCG_IF_FRAC
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] phase,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] if_out
);

  localparam int KF = DATA_W - 1;        // fraction bits of the constant
  localparam int PW = 2 * DATA_W;
  localparam int SH = PH_FRAC + KF - IF_FRAC;
  localparam logic signed [DATA_W-1:0] K_INV4PI =
      DATA_W'(round_real((2.0 ** KF) / (4.0 * PI)));

  logic signed [DATA_W-1:0] ph_n, ph_nm1, diff;
  logic [1:0]               fill;
  logic signed [PW-1:0]     full, rounded;

  assign diff    = phase - ph_nm1;
  assign full    = PW'(diff) * PW'(K_INV4PI);
  assign rounded = (full + (PW'(1) <<< (SH - 1))) >>> SH;

  always_ff @(posedge clk) begin
    if (rst) begin
      ph_n      <= '0;
      ph_nm1    <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      if_out    <= '0;
    end else begin
      out_valid <= in_valid && (fill == 2'd2);
      if (in_valid) begin
        ph_nm1 <= ph_n;
        ph_n   <= phase;
        if (fill != 2'd2) fill <= fill + 1'b1;
        if_out <= rounded[DATA_W-1:0];
      end
    end
  end

endmodule
