// Cotangent coefficient ROM of the Hilbert recursion.
//
// Holds C(m) = (2/N) * cot(pi*(m+1)/N) for the even positions m = 0, 2, ...,
// N-2, i.e. N/2 words addressed by k = m/2. These are the only coefficients
// the recursion uses (odd positions are plain shifts). The table is computed
// at elaboration from the formula and rounded to COEF_W-bit signed words with
// COEF_FRAC fraction bits; |C(m)| never exceeds 2/pi, so one integer bit is
// enough.
//
// Timing: synchronous read, data is valid one cycle after addr (block-RAM
// style, as in the reference design, which keeps this table in block RAM).
module cot_rom
  import pcg_if_pkg::*;
#(
  parameter int N         = PCG_WIN_N,
  parameter int COEF_W    = PCG_COEF_W,
  parameter int COEF_FRAC = PCG_COEF_FRAC
) (
  input  logic                           clk,
  input  logic [$clog2(N/2 > 1 ? N/2 : 2)-1:0] addr,
  output logic signed [COEF_W-1:0]       data
);

  localparam int DEPTH = N / 2;
  typedef logic signed [COEF_W-1:0] table_t [DEPTH];

  function automatic table_t make_table();
    table_t t;
    for (int k = 0; k < DEPTH; k++) begin
      real ang, c;
      ang  = PI * real'(2 * k + 1) / real'(N);
      c    = (2.0 / real'(N)) * $cos(ang) / $sin(ang);
      t[k] = COEF_W'(round_real(c * (2.0 ** COEF_FRAC)));
    end
    return t;
  endfunction

  localparam table_t ROM = make_table();

  always_ff @(posedge clk) begin
    data <= ROM[addr];
  end

endmodule
