// thread_scoreboard: one dependency bit per thread, the register interlock of
// the large warp microarchitecture. A large warp may be fetched again as soon as
// its first sub-warp completes, so a thread of the next instruction must not be
// packed while the sub-warp holding it for the previous instruction is still in
// the pipeline. set_* marks the threads of a sub-warp as it leaves the sub-warp
// former; clr_* (writeback) and ld_clr_* (a returning load) clear them. Clearing
// and setting the same bit in one cycle cannot happen in the core; set wins.
// Bits are indexed [warp][row][lane]. Reset clears every bit.
module thread_scoreboard #(
  parameter int unsigned N = 32,
  parameter int unsigned K = 8,
  parameter int unsigned W = 4
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              set_i,
  input  logic [$clog2(W)-1:0]              set_warp_i,
  input  logic [N-1:0]                      set_lanes_i,
  input  logic [N-1:0][$clog2(K)-1:0]       set_row_i,
  input  logic                              clr_i,
  input  logic [$clog2(W)-1:0]              clr_warp_i,
  input  logic [N-1:0]                      clr_lanes_i,
  input  logic [N-1:0][$clog2(K)-1:0]       clr_row_i,
  input  logic                              ld_clr_i,
  input  logic [$clog2(W)-1:0]              ld_clr_warp_i,
  input  logic [$clog2(K)-1:0]              ld_clr_row_i,
  input  logic [N-1:0]                      ld_clr_lanes_i,
  output logic [W-1:0][K-1:0][N-1:0]        dep_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dep_o <= '0;
    end else begin
      for (int c = 0; c < N; c++) begin
        if (clr_i && clr_lanes_i[c])       dep_o[clr_warp_i][clr_row_i[c]][c] <= 1'b0;
        if (ld_clr_i && ld_clr_lanes_i[c]) dep_o[ld_clr_warp_i][ld_clr_row_i][c] <= 1'b0;
        if (set_i && set_lanes_i[c])       dep_o[set_warp_i][set_row_i[c]][c] <= 1'b1;
      end
    end
  end
endmodule
