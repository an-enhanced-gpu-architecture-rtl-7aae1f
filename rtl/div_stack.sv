// div_stack: divergence (reconvergence) stack of one warp. Each entry holds a
// reconvergence PC, an active mask and an execute PC. A divergent branch pushes
// two entries in one cycle: first the join entry (reconvergence PC and execute
// PC both the control flow merge point, mask = mask before the branch), then the
// divergent entry for the path run second. When the warp's next PC equals the
// top entry's reconvergence PC the core pops it and takes its execute PC and
// mask. Entry fields follow the source; the depth (DEPTH) is this design's.
// push2_i pushes ent_a_i then ent_b_i; push1_i pushes ent_a_i; pop_i removes
// the top. A push and a pop in the same cycle are not allowed.
module div_stack #(
  parameter int unsigned MASK_W = 256,
  parameter int unsigned PC_W   = 16,
  parameter int unsigned DEPTH  = 16
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              push1_i,
  input  logic                              push2_i,
  input  logic                              pop_i,
  input  logic [PC_W-1:0]                   a_rpc_i,
  input  logic [MASK_W-1:0]                 a_mask_i,
  input  logic [PC_W-1:0]                   a_epc_i,
  input  logic [PC_W-1:0]                   b_rpc_i,
  input  logic [MASK_W-1:0]                 b_mask_i,
  input  logic [PC_W-1:0]                   b_epc_i,
  output logic                              empty_o,
  output logic                              full_o,    // fewer than two free entries
  output logic [PC_W-1:0]                   top_rpc_o,
  output logic [MASK_W-1:0]                 top_mask_o,
  output logic [PC_W-1:0]                   top_epc_o
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  logic [PC_W-1:0]   rpc  [DEPTH];
  logic [MASK_W-1:0] msk  [DEPTH];
  logic [PC_W-1:0]   epc  [DEPTH];
  logic [CW-1:0]     cnt;
  // entry indices (the count is one bit wider than an index)
  localparam int unsigned IW = $clog2(DEPTH);
  logic [IW-1:0]     top_ix, wr0_ix, wr1_ix;
  assign top_ix = IW'(cnt - 1'b1);
  assign wr0_ix = IW'(cnt);
  assign wr1_ix = IW'(cnt + 1'b1);

  assign empty_o    = (cnt == '0);
  assign full_o     = (cnt >= CW'(DEPTH - 1));
  assign top_rpc_o  = empty_o ? '0 : rpc[top_ix];
  assign top_mask_o = empty_o ? '0 : msk[top_ix];
  assign top_epc_o  = empty_o ? '0 : epc[top_ix];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
    end else if (push2_i) begin
      rpc[wr0_ix] <= a_rpc_i;        msk[wr0_ix] <= a_mask_i;        epc[wr0_ix] <= a_epc_i;
      rpc[wr1_ix] <= b_rpc_i; msk[wr1_ix] <= b_mask_i; epc[wr1_ix] <= b_epc_i;
      cnt <= cnt + CW'(2);
    end else if (push1_i) begin
      rpc[wr0_ix] <= a_rpc_i; msk[wr0_ix] <= a_mask_i; epc[wr0_ix] <= a_epc_i;
      cnt <= cnt + 1'b1;
    end else if (pop_i && !empty_o) begin
      cnt <= cnt - 1'b1;
    end
  end

  // pushing onto a full stack would lose an entry
  assert property (@(posedge clk) disable iff (!rst_n) !(push2_i && full_o));
  assert property (@(posedge clk) disable iff (!rst_n) !((push1_i || push2_i) && pop_i));
endmodule
