// Synchronization block: addressable shift register for the real part.
//
// The imaginary part of the analytic signal comes out of the Hilbert
// recursion N samples after the sample it belongs to, so the real part is
// delayed by the same amount. Like an addressable shift register, the block
// shifts its DEPTH-stage chain by one on every enable and outputs the stage
// selected by addr, i.e. the sample received addr+1 enables earlier. The
// analytic-signal module fixes addr to N-1 (delay = window size).
//
// Timing: on en the chain shifts and q is loaded with the selected stage as
// it was before the shift, so q is valid one cycle after en and holds. The
// chain is cleared by reset (zero history), which is this design's choice.
module sync_delay
  import pcg_if_pkg::*;
#(
  parameter int DEPTH  = PCG_WIN_N,
  parameter int DATA_W = PCG_DATA_W
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        en,
  input  logic [$clog2(DEPTH)-1:0]    addr,
  input  logic signed [DATA_W-1:0]    d,
  output logic signed [DATA_W-1:0]    q
);

  logic signed [DATA_W-1:0] sr [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      sr <= '{default: '0};
      q  <= '0;
    end else if (en) begin
      q     <= sr[addr];
      sr[0] <= d;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end

endmodule
