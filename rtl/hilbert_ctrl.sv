// Control unit of the analytic-signal module.
//
// After reset it sweeps all N addresses of the Hilbert memory once with the
// clear flag set (N cycles, x_ready low), so that the recursion starts from
// the transform of an all-zero window. Then, for every accepted sample:
//   cycle 0        accept: read the oldest Hilbert value (position 0 of the
//                  previous window, address base) for the output and advance
//                  base by one; Y_Ln computes Y in the same cycle
//   cycles 1..N/2  issue one update per cycle, k = 0 .. N/2-1: coefficient
//                  index k, memory address (base + 2k) mod N, i.e. the even
//                  positions m = 2k of the new window
//   2 more cycles  drain the multiplier pipeline (the last write lands)
// so a sample occupies the module for N/2 + 3 cycles; x_ready is high only in
// the idle state and a sample offered while it is low waits (valid/ready).
// The schedule, the address arithmetic and the clearing sweep are this
// design's own; the reference only states that a control unit generates the
// control signals of the module.
//
// Outputs: rd_en/rd_addr drive the memory read port (output read and update
// reads); out_strobe marks the output read; op_valid/op_k/op_addr describe
// the update issued this cycle; clr_valid/clr_addr is the clearing sweep.
module hilbert_ctrl
  import pcg_if_pkg::*;
#(
  parameter int N = PCG_WIN_N
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 x_valid,
  output logic                 x_ready,
  output logic                 rd_en,
  output logic [$clog2(N)-1:0] rd_addr,
  output logic                 out_strobe,
  output logic                 op_valid,
  output logic [$clog2(N/2 > 1 ? N/2 : 2)-1:0] op_k,
  output logic [$clog2(N)-1:0] op_addr,
  output logic                 clr_valid,
  output logic [$clog2(N)-1:0] clr_addr
);

  localparam int AW    = $clog2(N);
  localparam int KW    = $clog2(N/2 > 1 ? N/2 : 2);
  localparam int DRAIN = 2;  // multiplier latency after the read

  typedef enum logic [1:0] {S_CLEAR, S_IDLE, S_RUN, S_DRAIN} state_t;

  state_t        state;
  logic [AW-1:0] base;   // address of position 0 of the current window
  logic [AW-1:0] cnt;    // clear address / update index / drain count

  assign x_ready    = (state == S_IDLE);
  assign out_strobe = (state == S_IDLE) && x_valid;
  assign op_valid   = (state == S_RUN);
  assign op_k       = KW'(cnt);
  assign op_addr    = base + AW'({cnt, 1'b0});
  assign clr_valid  = (state == S_CLEAR);
  assign clr_addr   = cnt;
  assign rd_en      = out_strobe || op_valid;
  assign rd_addr    = op_valid ? op_addr : base;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_CLEAR;
      base  <= '0;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_CLEAR: begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
          end
        end
        S_IDLE: begin
          if (x_valid) begin
            base  <= base + 1'b1;
            cnt   <= '0;
            state <= S_RUN;
          end
        end
        S_RUN: begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N / 2 - 1)) begin
            cnt   <= '0;
            state <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(DRAIN - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
          end
        end
        default: state <= S_CLEAR;
      endcase
    end
  end

endmodule
