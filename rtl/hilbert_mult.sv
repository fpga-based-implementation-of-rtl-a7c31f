// Multiplier block of the analytic-signal module: Y(n) * C(m).
//
// Reads the cotangent coefficient C(2k) from the ROM and multiplies it by the
// input difference Y with a full-width parallel multiplier (26 x 26 bits, the
// size that maps onto four 18 x 18 hard multipliers). The product is rounded
// back to the Q(DATA_W-SIG_FRAC).SIG_FRAC format of the Hilbert values.
//
// Timing: two-stage pipeline. Stage 1 is the ROM read (y and the valid bit are
// registered alongside), stage 2 the registered product, so prod/out_valid
// follow in_valid/k/y by exactly two cycles. One operation per cycle.
// The rounding (add half an LSB, then shift) is this design's choice.
module hilbert_mult
  import pcg_if_pkg::*;
#(
  parameter int N         = PCG_WIN_N,
  parameter int DATA_W    = PCG_DATA_W,
  parameter int COEF_W    = PCG_COEF_W,
  parameter int COEF_FRAC = PCG_COEF_FRAC
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        in_valid,
  input  logic [$clog2(N/2 > 1 ? N/2 : 2)-1:0] k,
  input  logic signed [DATA_W-1:0]    y,
  output logic                        out_valid,
  output logic signed [DATA_W-1:0]    prod
);

  localparam int PW = DATA_W + COEF_W;

  logic signed [COEF_W-1:0] coef;
  logic signed [DATA_W-1:0] y_q;
  logic                     v_q;
  logic signed [PW-1:0]     full, rounded;

  cot_rom #(.N(N), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC)) u_rom (
    .clk  (clk),
    .addr (k),
    .data (coef)
  );

  assign full    = PW'(y_q) * PW'(coef);
  assign rounded = (full + (PW'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q       <= 1'b0;
      y_q       <= '0;
      out_valid <= 1'b0;
      prod      <= '0;
    end else begin
      v_q       <= in_valid;
      y_q       <= y;
      out_valid <= v_q;
      prod      <= rounded[DATA_W-1:0];
    end
  end

endmodule
