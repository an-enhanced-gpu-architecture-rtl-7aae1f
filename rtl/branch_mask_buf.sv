// branch_mask_buf: temporary active mask buffers for branches of large warps.
// Whether a large warp diverged is only known once all its sub-warps have
// executed the branch, so each sub-warp ORs its threads into a "taken" or a
// "not taken" buffer (one bit per thread of the large warp, placed by row and
// lane). When the last sub-warp is done the core reads the pair, updates the
// warp's PC and mask and pushes stack entries if both are non-empty, and
// clears the pair with clr_i. One pair per large warp (the source sizes a
// single pair; keeping one per warp lets branches of different warps overlap).
// acc_i and clr_i for the same warp in one cycle: the clear wins.
module branch_mask_buf #(
  parameter int unsigned N = 32,
  parameter int unsigned K = 8,
  parameter int unsigned W = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          acc_i,
  input  logic [$clog2(W)-1:0]          acc_warp_i,
  input  logic [N-1:0]                  acc_lanes_i,
  input  logic [N-1:0][$clog2(K)-1:0]   acc_row_i,
  input  logic [N-1:0]                  acc_taken_i,
  input  logic                          clr_i,
  input  logic [$clog2(W)-1:0]          clr_warp_i,
  input  logic [$clog2(W)-1:0]          rd_warp_i,
  output logic [K-1:0][N-1:0]           taken_o,
  output logic [K-1:0][N-1:0]           not_taken_o,
  output logic                          diverged_o
);
  logic [W-1:0][K-1:0][N-1:0] tk, nt;

  assign taken_o     = tk[rd_warp_i];
  assign not_taken_o = nt[rd_warp_i];
  assign diverged_o  = (taken_o != '0) && (not_taken_o != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tk <= '0;
      nt <= '0;
    end else begin
      if (acc_i)
        for (int c = 0; c < N; c++)
          if (acc_lanes_i[c]) begin
            if (acc_taken_i[c]) tk[acc_warp_i][acc_row_i[c]][c] <= 1'b1;
            else                nt[acc_warp_i][acc_row_i[c]][c] <= 1'b1;
          end
      if (clr_i) begin
        tk[clr_warp_i] <= '0;
        nt[clr_warp_i] <= '0;
      end
    end
  end
endmodule
