// Feedback block: storage and update of the sliding Hilbert transform.
//
// The moving-DHT recursion gives the Hilbert transform of the current
// N-sample window, x'(n, m), from that of the previous window:
//   x'(n, m) = x'(n-1, m+1)                 for odd m
//   x'(n, m) = x'(n-1, m+1) + Y(n) * C(m)   for even m
// with x'(n-1, N) = x'(n-1, 0) (the window is circular). Instead of moving
// all N values every sample, they are kept in an N-word memory at fixed
// addresses: position m of window n lives at address (m + n) mod N, so the
// shift is free and only the even positions are read, added to and written
// back. Which addresses are "even" therefore alternates with the sample
// number; the control unit generates them.
//
// This block is the memory with one read port and one read-modify-write
// port: rd_data <= mem[rd_addr] (one-cycle read latency), and on upd_valid
// mem[upd_addr] <= upd_old + upd_prod (the caller supplies the value read
// earlier). With clr set the write stores zero instead; the control unit uses
// it to clear the memory after reset. Sums wrap in DATA_W bits.
module hilbert_feedback
  import pcg_if_pkg::*;
#(
  parameter int N      = PCG_WIN_N,
  parameter int DATA_W = PCG_DATA_W
) (
  input  logic                        clk,
  input  logic                        rd_en,
  input  logic [$clog2(N)-1:0]        rd_addr,
  output logic signed [DATA_W-1:0]    rd_data,
  input  logic                        upd_valid,
  input  logic                        clr,
  input  logic [$clog2(N)-1:0]        upd_addr,
  input  logic signed [DATA_W-1:0]    upd_old,
  input  logic signed [DATA_W-1:0]    upd_prod
);

  logic signed [DATA_W-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (upd_valid) mem[upd_addr] <= clr ? '0 : upd_old + upd_prod;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
