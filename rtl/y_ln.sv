// Y_Ln block: input difference of the moving Hartley/Hilbert recursion.
//
// For every new sample x_add the block returns Y = x_add - x_old, where x_old
// is the sample that leaves the N-sample window (the sample received N
// samples earlier). The window is kept in an N-entry circular buffer written
// at a rotating pointer; the entry at the pointer is read (old sample) and
// overwritten (new sample) in the same cycle. Until N samples have been
// received the missing history counts as zero, so the buffer itself needs no
// clearing after reset.
//
// The input sample (IN_W bits, a fraction in [-1, 1)) is first aligned to the
// internal Q(DATA_W-SIG_FRAC).SIG_FRAC format; Y is given in that format.
//
// Timing: x_valid is a one-cycle strobe; y_out/y_valid are registered and
// appear on the next cycle. y_out holds its value until the next sample.
// The subtraction itself follows the reference design; the circular buffer
// and the fill counter are this design's own implementation of the window.
module y_ln
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
  output logic                     y_valid,
  output logic signed [DATA_W-1:0] y_out
);

  localparam int AW = (N > 1) ? $clog2(N) : 1;

  logic signed [DATA_W-1:0] win [N];
  logic [AW-1:0]            ptr;
  logic                     filled;
  logic signed [DATA_W-1:0] x_ext, x_old;

  // Align the IN_W-bit fraction to the internal format.
  assign x_ext = DATA_W'(x_in) <<< (SIG_FRAC - (IN_W - 1));
  assign x_old = filled ? win[ptr] : '0;

  always_ff @(posedge clk) begin
    if (x_valid) win[ptr] <= x_ext;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr     <= '0;
      filled  <= 1'b0;
      y_valid <= 1'b0;
      y_out   <= '0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) begin
        y_out <= x_ext - x_old;
        if (ptr == AW'(N - 1)) begin
          ptr    <= '0;
          filled <= 1'b1;
        end else begin
          ptr <= ptr + 1'b1;
        end
      end
    end
  end

endmodule
