// subwarp_former: breaks the instruction of one large warp into SIMD-width
// sub-warps (the "sub-warp logic" of the large warp microarchitecture).
// On start_i it copies the large warp's two-dimensional active mask (K rows of
// N columns, one column per SIMD lane) so the warp's own mask stays intact.
// Each following cycle it emits one sub-warp and clears the copied bits it used:
//   SW_PACK   : every column independently takes its lowest-numbered row that is
//               still set, so up to N threads from different rows share a
//               sub-warp; row_o gives the row of each lane's thread, which is
//               what the per-lane register file banks are indexed by.
//   SW_ROW    : the lowest remaining row goes out whole (memory instructions, so
//               sub-warping never adds memory divergence).
//   SW_SINGLE : one sub-warp with no lanes (jumps and exits only need one PC update).
// A thread whose dependency bit (dep_i) is still set by an earlier, unfinished
// sub-warp is not packed; in SW_PACK the column then offers the next free row,
// in SW_ROW the row waits. A cycle with nothing to pack is a bubble. busy_o
// (remaining threads) is the stall back to fetch; ready_o says a new
// instruction may be loaded this cycle (idle, or the last sub-warp is leaving).
// An all-zero mask still produces one empty sub-warp so the instruction retires.
// The column-wise lowest-row selection reproduces the worked example of the
// source; skipping interlocked threads in a column is this design's choice.
module subwarp_former
  import gpu_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned K = 8,
  parameter int unsigned W = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start_i,
  input  logic [$clog2(W)-1:0]          warp_i,
  input  logic [K-1:0][N-1:0]           mask_i,
  input  sw_mode_e                      mode_i,
  input  logic [K-1:0][N-1:0]           dep_i,      // dependency bits of warp_o
  output logic [$clog2(W)-1:0]          warp_o,
  output logic                          busy_o,
  output logic                          ready_o,
  output logic                          interlock_o,  // a remaining thread waits on its dependency bit
  output logic                          sw_valid_o,
  output logic                          sw_last_o,
  output logic [N-1:0]                  sw_lanes_o,
  output logic [N-1:0][$clog2(K)-1:0]   sw_row_o
);
  localparam int unsigned RW = (K > 1) ? $clog2(K) : 1;

  logic [K-1:0][N-1:0] rem_q, rem_d;
  sw_mode_e            mode_q;
  logic                active_q, empty_q;   // empty_q: instruction with no threads

  always_comb begin
    logic found;
    found      = 1'b0;
    rem_d      = rem_q;
    sw_valid_o = 1'b0;
    sw_lanes_o = '0;
    sw_row_o   = '0;
    if (active_q) begin
      if (empty_q || mode_q == SW_SINGLE) begin
        sw_valid_o = 1'b1;
        rem_d      = '0;
      end else if (mode_q == SW_ROW) begin
        for (int r = 0; r < K; r++) begin
          if (!found && (rem_q[r] != '0)) begin
            found = 1'b1;
            if ((rem_q[r] & dep_i[r]) == '0) begin
              sw_valid_o = 1'b1;
              sw_lanes_o = rem_q[r];
              for (int c = 0; c < N; c++) sw_row_o[c] = RW'(r);
              rem_d[r]   = '0;
            end
          end
        end
      end else begin
        for (int c = 0; c < N; c++) begin
          for (int r = K-1; r >= 0; r--) begin
            if (rem_q[r][c] && !dep_i[r][c]) begin
              sw_lanes_o[c] = 1'b1;
              sw_row_o[c]   = RW'(r);
            end
          end
          if (sw_lanes_o[c]) rem_d[sw_row_o[c]][c] = 1'b0;
        end
        sw_valid_o = (sw_lanes_o != '0);
      end
    end
    sw_last_o   = sw_valid_o && (rem_d == '0);
    interlock_o = active_q && ((rem_q & dep_i) != '0);
    busy_o    = active_q && !sw_last_o;
    ready_o   = !active_q || sw_last_o;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem_q    <= '0;
      mode_q   <= SW_PACK;
      active_q <= 1'b0;
      empty_q  <= 1'b0;
      warp_o   <= '0;
    end else if (start_i && ready_o) begin
      rem_q    <= (mode_i == SW_SINGLE) ? '0 : mask_i;
      mode_q   <= mode_i;
      active_q <= 1'b1;
      empty_q  <= (mask_i == '0);
      warp_o   <= warp_i;
    end else begin
      rem_q <= rem_d;
      if (sw_last_o) active_q <= 1'b0;
    end
  end
endmodule
