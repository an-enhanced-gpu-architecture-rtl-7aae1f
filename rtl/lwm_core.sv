// lwm_core: one GPU core (streaming multiprocessor) built around large warps.
// Instead of many 32-thread warps the core keeps W large warps of K x N threads
// (default 4 x 256), each with one PC, a K-row by N-column active mask and a
// divergence stack. A two-level round-robin scheduler picks a large warp; its
// instruction (from the external instruction cache / decoder, fetch_* out,
// inst_i back in the same cycle) goes to the sub-warp former, which packs the
// active threads into N-wide sub-warps, at most one thread per column, while
// fetch stalls. Sub-warps then flow through three stages:
//   S1 register read : every lane reads its own register file bank at the row of
//                      the thread it carries, plus the thread's predicate bit
//   S2 execute       : lane ALUs; the conditional accumulate / tree traverse unit
//                      (row sub-warps); a load sends one line request per row
//                      to the DRAM controller, with its row buffer hint bit
//   S3 writeback     : registers, predicates and scratchpad are written, the
//                      threads' dependency bits are cleared, branch outcomes are
//                      gathered in the temporary taken / not-taken masks
// Re-fetch: after most instructions the warp is ready again once its first
// sub-warp has written back (PC + 1); the per-thread dependency bits keep later
// instructions from using threads still in flight. Branches, jumps, exits and
// loads instead wait until all their sub-warps are done (loads until all data
// has returned, which is what the scheduler counts as a long-latency stall);
// then the warp's PC and mask are updated in one resolve step and, for a
// divergent branch, a join and a divergent entry are pushed (the join is left
// out when the top entry already reconverges at the same PC, the divergent
// entry when the not-taken path starts at the reconvergence PC, so a loop that
// threads leave at different iterations holds one entry). A warp whose PC
// equals the reconvergence PC on top of its stack pops it before it is fetched.
// Loads and the scratchpad: a load fills register rd of each thread of a row
// with the words of one 128-byte line (lane c gets word c); COND_ACC writes to
// the 32KB banked scratchpad, which the host reads through spm_*.
// What follows the source: large warps and their mask layout, sub-warp packing,
// per-lane register banks, per-thread interlock bits, the branch re-fetch rule,
// row-wise sub-warps for memory instructions, single sub-warps for jumps,
// two-level scheduling with timeout, the conditional accumulate / tree traverse
// hardware and hinted FR-FCFS memory scheduling. This design's own: the small
// instruction set, the three-stage back end, treating loads as blocking, applying
// COND_ACC / TREE_TRAVERSE to each 32-thread row, the request queue depth and the
// address map. Kernel start: launch_i loads launch_pc_i into every warp with all
// threads active; done_o rises when every warp has exited and all is drained.
module lwm_core
  import gpu_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned K         = 8,
  parameter int unsigned W         = 4,
  parameter int unsigned R         = 16,
  parameter int unsigned FG        = 1,
  parameter int unsigned TIMEOUT   = 32768,
  parameter int unsigned STACK     = 16,
  parameter int unsigned SPM_BYTES = 32768,
  parameter int unsigned NBANK     = 8,
  parameter int unsigned T_HIT     = 100,
  parameter int unsigned T_CONF    = 300
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     launch_i,
  input  logic [PC_W-1:0]          launch_pc_i,
  // instruction cache and decoder
  output logic                     fetch_valid_o,
  output logic [$clog2(W)-1:0]     fetch_warp_o,
  output logic [PC_W-1:0]          fetch_pc_o,
  input  inst_t                    inst_i,
  // DRAM channel
  output logic                     dram_rd_o,
  output logic [31:0]              dram_addr_o,
  input  logic [N*32-1:0]          dram_rdata_i,
  // scratchpad host read port
  input  logic                     spm_re_i,
  input  logic [31:0]              spm_raddr_i,
  output logic [31:0]              spm_rdata_o,
  output logic                     done_o,
  // event counters
  output logic [31:0]              n_fetch_o,
  output logic [31:0]              n_subwarp_o,
  output logic [31:0]              n_thread_o,
  output logic [31:0]              n_fetch_stall_o,
  output logic [31:0]              n_interlock_o,
  output logic [31:0]              n_diverge_o,
  output logic [31:0]              n_pop_o,
  output logic [31:0]              n_single_o,
  output logic [31:0]              n_row_sw_o,
  output logic [31:0]              n_switch_o,
  output logic [31:0]              n_timeout_o,
  output logic [31:0]              n_cacc_o,
  output logic [31:0]              n_ttrav_o,
  output logic [31:0]              n_row_hit_o,
  output logic [31:0]              n_row_conf_o,
  output logic [31:0]              n_hold_o,
  output logic [31:0]              n_hold_hit_o,
  output logic [31:0]              n_hold_exp_o
);
  localparam int unsigned WB_ = $clog2(W);
  localparam int unsigned KB  = $clog2(K);
  localparam int unsigned RB  = $clog2(R);
  localparam int unsigned TAG_W = WB_ + KB;
  localparam int unsigned CW  = $clog2(N) + 1;

  typedef logic [K-1:0][N-1:0] amask_t;

  // ---------------- warp state ----------------
  logic [PC_W-1:0]  pc_q   [W];
  amask_t           mask_q [W];
  logic [W-1:0]     done_q, blocked_q, rp_q;
  inst_t            winst_q [W];   // instruction being executed, for resolution
  logic [PC_W-1:0]  wpc_q   [W];
  logic [7:0]       ldout_q [W];
  logic [W-1:0][K-1:0][N-1:0] pred_q;
  logic [W-1:0][K-1:0][RB-1:0] ld_rd_q;
  logic [W-1:0][K-1:0][N-1:0]  ld_lanes_q;

  // divergence stacks
  logic [W-1:0]            st_empty, st_full, st_push1, st_push2, st_pop;
  logic [PC_W-1:0]         st_rpc [W];
  logic [PC_W-1:0]         st_epc [W];
  amask_t                  st_mask [W];
  logic [PC_W-1:0]         st_a_rpc, st_a_epc, st_b_rpc, st_b_epc;
  amask_t                  st_a_mask, st_b_mask;

  for (genvar w = 0; w < W; w++) begin : g_stack
    div_stack #(.MASK_W(K*N), .PC_W(PC_W), .DEPTH(STACK)) u_stack (
      .clk, .rst_n,
      .push1_i(st_push1[w]), .push2_i(st_push2[w]), .pop_i(st_pop[w]),
      .a_rpc_i(st_a_rpc), .a_mask_i(st_a_mask), .a_epc_i(st_a_epc),
      .b_rpc_i(st_b_rpc), .b_mask_i(st_b_mask), .b_epc_i(st_b_epc),
      .empty_o(st_empty[w]), .full_o(st_full[w]),
      .top_rpc_o(st_rpc[w]), .top_mask_o(st_mask[w]), .top_epc_o(st_epc[w]));
  end

  // ---------------- scheduler ----------------
  logic [W-1:0] ready, stalled, pop_now;
  logic         grant_v, take, sw_switch, sw_timeout;
  logic [WB_-1:0] grant;

  always_comb begin
    for (int w = 0; w < W; w++) begin
      pop_now[w] = !done_q[w] && !blocked_q[w] && !st_empty[w] && (pc_q[w] == st_rpc[w]);
      ready[w]   = !done_q[w] && !blocked_q[w] && !pop_now[w];
      stalled[w] = done_q[w] || (ldout_q[w] != '0);
    end
  end

  two_level_sched #(.W(W), .FG(FG), .TIMEOUT(TIMEOUT)) u_sched (
    .clk, .rst_n, .ready_i(ready), .stalled_i(stalled), .take_i(take),
    .grant_valid_o(grant_v), .grant_o(grant), .prio_group_o(),
    .switch_o(sw_switch), .timeout_o(sw_timeout));

  // ---------------- fetch and sub-warp former ----------------
  logic             fm_ready, fm_busy, fm_ilk, sw_v, sw_last;
  logic [WB_-1:0]   fm_warp;
  logic [N-1:0]     sw_lanes;
  logic [N-1:0][KB-1:0] sw_row;
  logic [W-1:0][K-1:0][N-1:0] dep;
  inst_t            fm_inst_q;
  logic             fm_first_q;

  assign take          = grant_v && fm_ready && !launch_i;
  assign fetch_valid_o = take;
  assign fetch_warp_o  = grant;
  assign fetch_pc_o    = pc_q[grant];

  subwarp_former #(.N(N), .K(K), .W(W)) u_former (
    .clk, .rst_n, .start_i(take), .warp_i(grant), .mask_i(mask_q[grant]),
    .mode_i(mode_of(inst_i.op)), .dep_i(dep[fm_warp]), .warp_o(fm_warp),
    .busy_o(fm_busy), .ready_o(fm_ready), .interlock_o(fm_ilk), .sw_valid_o(sw_v), .sw_last_o(sw_last),
    .sw_lanes_o(sw_lanes), .sw_row_o(sw_row));

  // ---------------- pipeline registers ----------------
  typedef struct packed {
    logic                 v;
    logic [WB_-1:0]       warp;
    logic [N-1:0]         lanes;
    logic [N-1:0][KB-1:0] row;
    inst_t                inst;
    logic                 first;
    logic                 last;
  } sw_t;

  sw_t s1_q, s2_q, s3_q;
  logic [N-1:0][31:0] s2_a, s2_b, s3_res;
  logic [N-1:0]       s2_p, s3_wr, s3_pwr, s3_pv;
  logic [N-1:0][31:0] s3_spm_addr, s3_spm_data;
  logic [N-1:0]       s3_spm_we;

  // register read (S1)
  logic [N-1:0][31:0] rf_a, rf_b;
  logic [N-1:0]       s1_p;
  always_comb
    for (int c = 0; c < N; c++) s1_p[c] = pred_q[s1_q.warp][s1_q.row[c]][c];

  // execute (S2)
  logic [N-1:0][31:0] alu_res;
  logic [N-1:0]       alu_wr, alu_p, alu_pwr;
  for (genvar c = 0; c < N; c++) begin : g_lane
    lane_alu #(.DW(32)) u_alu (
      .op_i(s2_q.inst.op), .a_i(s2_a[c]), .b_i(s2_b[c]), .imm_i(s2_q.inst.imm),
      .tid_i(32'(int'(s2_q.warp) * K * N + int'(s2_q.row[c]) * N + c)),
      .result_o(alu_res[c]), .wr_o(alu_wr[c]), .pred_o(alu_p[c]), .pred_wr_o(alu_pwr[c]));
  end

  // the row sub-warp's shared operands come from its lowest active lane
  logic [31:0] s2_base, s2_src;
  always_comb begin
    s2_base = '0; s2_src = '0;
    for (int c = N-1; c >= 0; c--)
      if (s2_q.lanes[c]) begin s2_base = s2_a[c]; s2_src = s2_b[c]; end
  end

  logic [N-1:0][31:0] ca_addr;
  logic [N-1:0]       ca_we;
  logic [CW-1:0]      ca_cnt;
  logic [31:0]        ca_next;
  cond_acc_unit #(.N(N), .ADDR_W(32)) u_cacc (
    .tt_i(s2_q.inst.op == OP_TTRAV), .valid_i(s2_q.lanes), .pred_i(s2_p),
    .base_i(s2_base), .size_log2_i(2'd2), .node_size_i(s2_src),
    .addr_o(ca_addr), .we_o(ca_we), .count_o(ca_cnt), .next_o(ca_next));

  // load request
  logic            mreq_v, mreq_rdy, mresp_v;
  logic [TAG_W-1:0] mresp_tag;
  logic [N*32-1:0] mresp_data;
  assign mreq_v = s2_q.v && (s2_q.inst.op == OP_LD) && (s2_q.lanes != '0);

  mem_ctrl_rbh #(.NBANK(NBANK), .QDEPTH(W*K), .T_HIT(T_HIT), .T_CONF(T_CONF),
                 .TAG_W(TAG_W), .LINE_W(N*32), .ADDR_W(32)) u_mc (
    .clk, .rst_n, .req_valid_i(mreq_v), .req_ready_o(mreq_rdy),
    .req_addr_i({s2_base[31:7], 7'd0}), .req_hint_i(s2_q.inst.hint),
    .req_tag_i({s2_q.warp, s2_q.row[0]}),
    .resp_valid_o(mresp_v), .resp_tag_o(mresp_tag), .resp_data_o(mresp_data),
    .dram_rd_o, .dram_addr_o, .dram_rdata_i,
    .n_hit_o(n_row_hit_o), .n_conf_o(n_row_conf_o), .n_hold_o(n_hold_o),
    .n_hold_hit_o(n_hold_hit_o), .n_hold_exp_o(n_hold_exp_o));

  // one outstanding load per row at most, and the queue holds one per row
  assert property (@(posedge clk) disable iff (!rst_n) mreq_v |-> mreq_rdy);

  logic [WB_-1:0] rs_warp;
  logic [KB-1:0]  rs_row;
  assign {rs_warp, rs_row} = mresp_tag;

  // register file
  logic [N-1:0] wa_en;
  assign wa_en = (s3_q.v ? s3_wr : '0);
  banked_rf #(.N(N), .K(K), .W(W), .R(R), .DATA_W(32)) u_rf (
    .clk,
    .rd_warp_i(s1_q.warp), .rd_row_i(s1_q.row), .rd_reg1_i(s1_q.inst.rs1[RB-1:0]),
    .rd_reg2_i(s1_q.inst.rs2[RB-1:0]), .rd_data1_o(rf_a), .rd_data2_o(rf_b),
    .wa_en_i(wa_en), .wa_warp_i(s3_q.warp), .wa_row_i(s3_q.row),
    .wa_reg_i(s3_q.inst.rd[RB-1:0]), .wa_data_i(s3_res),
    .wb_en_i(mresp_v ? ld_lanes_q[rs_warp][rs_row] : '0), .wb_warp_i(rs_warp),
    .wb_row_i(rs_row), .wb_reg_i(ld_rd_q[rs_warp][rs_row]), .wb_data_i(mresp_data));

  // dependency bits
  logic s3_clr;
  assign s3_clr = s3_q.v && (s3_q.inst.op != OP_LD);
  thread_scoreboard #(.N(N), .K(K), .W(W)) u_sb (
    .clk, .rst_n,
    .set_i(sw_v), .set_warp_i(fm_warp), .set_lanes_i(sw_lanes), .set_row_i(sw_row),
    .clr_i(s3_clr), .clr_warp_i(s3_q.warp), .clr_lanes_i(s3_q.lanes), .clr_row_i(s3_q.row),
    .ld_clr_i(mresp_v), .ld_clr_warp_i(rs_warp), .ld_clr_row_i(rs_row),
    .ld_clr_lanes_i(ld_lanes_q[rs_warp][rs_row]), .dep_o(dep));

  // branch outcome buffers
  logic           res_v;
  logic [WB_-1:0] res_w;
  amask_t         bm_tk, bm_nt;
  logic           bm_div;
  branch_mask_buf #(.N(N), .K(K), .W(W)) u_bmb (
    .clk, .rst_n,
    .acc_i(s3_q.v && s3_q.inst.op == OP_BRA), .acc_warp_i(s3_q.warp),
    .acc_lanes_i(s3_q.lanes), .acc_row_i(s3_q.row), .acc_taken_i(s3_pv),
    .clr_i(res_v), .clr_warp_i(res_w), .rd_warp_i(res_w),
    .taken_o(bm_tk), .not_taken_o(bm_nt), .diverged_o(bm_div));

  // scratchpad
  logic         spm_conflict;
  scratchpad #(.N(N), .BYTES(SPM_BYTES), .ADDR_W(32)) u_spm (
    .clk, .we_i(s3_q.v ? s3_spm_we : '0), .waddr_i(s3_spm_addr), .wdata_i(s3_spm_data),
    .grant_o(), .conflict_o(spm_conflict),
    .re_i(spm_re_i), .raddr_i(spm_raddr_i), .rdata_o(spm_rdata_o));

  // a conditional accumulate writes contiguous words, so it never conflicts
  assert property (@(posedge clk) disable iff (!rst_n) !spm_conflict);

  logic need_join, need_div;

  // resolution: one blocked warp per cycle whose last sub-warp has written back
  always_comb begin
    res_v = 1'b0; res_w = '0;
    for (int w = W-1; w >= 0; w--)
      if (rp_q[w] && ldout_q[w] == '0) begin res_v = 1'b1; res_w = WB_'(w); end
  end

  always_comb begin
    // A join entry is not needed when the top entry already reconverges at the
    // same PC (its mask covers this one); a divergent entry is not needed when
    // the not-taken path starts at the reconvergence PC (a loop exit). This
    // keeps a loop whose threads leave at different iterations at one entry.
    need_join = !(!st_empty[res_w] && st_rpc[res_w] == winst_q[res_w].rpc);
    need_div  = (wpc_q[res_w] + 1'b1) != winst_q[res_w].rpc;
    st_push1  = '0;
    st_push2  = '0;
    st_a_rpc  = winst_q[res_w].rpc;
    st_a_epc  = winst_q[res_w].rpc;
    st_a_mask = mask_q[res_w];
    st_b_rpc  = winst_q[res_w].rpc;
    st_b_epc  = wpc_q[res_w] + 1'b1;
    st_b_mask = bm_nt;
    if (!need_join) begin
      st_a_epc  = wpc_q[res_w] + 1'b1;
      st_a_mask = bm_nt;
    end
    if (res_v && winst_q[res_w].op == OP_BRA && bm_div) begin
      if (need_join && need_div)     st_push2[res_w] = 1'b1;
      else if (need_join || need_div) st_push1[res_w] = 1'b1;
    end
    st_pop = pop_now;
  end

  // ---------------- sequential control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= '0; s2_q <= '0; s3_q <= '0;
      s2_a <= '0; s2_b <= '0; s2_p <= '0;
      s3_res <= '0; s3_wr <= '0; s3_pwr <= '0; s3_pv <= '0;
      s3_spm_addr <= '0; s3_spm_data <= '0; s3_spm_we <= '0;
      fm_inst_q <= '0; fm_first_q <= 1'b0;
      done_q <= '1; blocked_q <= '0; rp_q <= '0;
      pred_q <= '0; ld_rd_q <= '0; ld_lanes_q <= '0;
      for (int w = 0; w < W; w++) begin
        pc_q[w] <= '0; mask_q[w] <= '0; winst_q[w] <= '0; wpc_q[w] <= '0; ldout_q[w] <= '0;
      end
      n_fetch_o <= '0; n_subwarp_o <= '0; n_thread_o <= '0; n_fetch_stall_o <= '0;
      n_interlock_o <= '0; n_diverge_o <= '0; n_pop_o <= '0; n_single_o <= '0;
      n_row_sw_o <= '0; n_switch_o <= '0; n_timeout_o <= '0; n_cacc_o <= '0; n_ttrav_o <= '0;
    end else begin
      // kernel launch
      if (launch_i) begin
        for (int w = 0; w < W; w++) begin
          pc_q[w] <= launch_pc_i; mask_q[w] <= '1;
        end
        done_q <= '0; blocked_q <= '0; rp_q <= '0;
      end

      // fetch
      if (take) begin
        blocked_q[grant] <= 1'b1;
        winst_q[grant]   <= inst_i;
        wpc_q[grant]     <= pc_q[grant];
        fm_inst_q        <= inst_i;
        fm_first_q       <= 1'b1;
        n_fetch_o        <= n_fetch_o + 1;
      end else if (sw_v) begin
        fm_first_q <= 1'b0;
      end
      if (grant_v && !fm_ready) n_fetch_stall_o <= n_fetch_stall_o + 1;
      if (fm_ilk)               n_interlock_o   <= n_interlock_o + 1;

      // S0 -> S1
      s1_q <= '{v: sw_v, warp: fm_warp, lanes: sw_lanes, row: sw_row,
                inst: fm_inst_q, first: fm_first_q, last: sw_last};
      if (sw_v) begin
        n_subwarp_o <= n_subwarp_o + 1;
        n_thread_o  <= n_thread_o + 32'($countones(sw_lanes));
        if (mode_of(fm_inst_q.op) == SW_SINGLE) n_single_o <= n_single_o + 1;
        if (mode_of(fm_inst_q.op) == SW_ROW)    n_row_sw_o <= n_row_sw_o + 1;
      end

      // S1 -> S2
      s2_q <= s1_q;
      s2_a <= rf_a;
      s2_b <= rf_b;
      s2_p <= s1_p & s1_q.lanes;

      // S2 -> S3
      s3_q      <= s2_q;
      s3_pv     <= s2_p;
      s3_spm_we <= '0;
      for (int c = 0; c < N; c++) begin
        s3_res[c] <= alu_res[c];
        s3_wr[c]  <= alu_wr[c] && s2_q.lanes[c];
        s3_pwr[c] <= alu_pwr[c] && s2_q.lanes[c];
        if (s2_q.inst.op == OP_SETLT || s2_q.inst.op == OP_SETGT) s3_pv[c] <= alu_p[c];
        s3_spm_addr[c] <= ca_addr[c];
        s3_spm_data[c] <= s2_b[c];
        if (s2_q.inst.op == OP_CACC) begin
          s3_res[c]    <= 32'(ca_cnt);
          s3_wr[c]     <= s2_q.lanes[c];
          s3_spm_we[c] <= ca_we[c];
        end
        if (s2_q.inst.op == OP_TTRAV) begin
          s3_res[c] <= ca_next;
          s3_wr[c]  <= s2_q.lanes[c];
        end
      end
      if (s2_q.v && s2_q.inst.op == OP_CACC)  n_cacc_o  <= n_cacc_o + 1;
      if (s2_q.v && s2_q.inst.op == OP_TTRAV) n_ttrav_o <= n_ttrav_o + 1;
      if (mreq_v) begin
        ldout_q[s2_q.warp] <= ldout_q[s2_q.warp] + 1'b1;
        ld_rd_q[s2_q.warp][s2_q.row[0]]    <= s2_q.inst.rd[RB-1:0];
        ld_lanes_q[s2_q.warp][s2_q.row[0]] <= s2_q.lanes;
      end
      if (mresp_v) ldout_q[rs_warp] <= ldout_q[rs_warp] - 1'b1;
      if (mreq_v && mresp_v && rs_warp == s2_q.warp) ldout_q[rs_warp] <= ldout_q[rs_warp];

      // writeback (S3)
      if (s3_q.v) begin
        for (int c = 0; c < N; c++)
          if (s3_pwr[c]) pred_q[s3_q.warp][s3_q.row[c]][c] <= s3_pv[c];
        if (waits_all(s3_q.inst.op)) begin
          if (s3_q.last) rp_q[s3_q.warp] <= 1'b1;
        end else if (s3_q.first) begin
          pc_q[s3_q.warp]      <= pc_q[s3_q.warp] + 1'b1;
          blocked_q[s3_q.warp] <= 1'b0;
        end
      end

      // resolution of branches, jumps, exits and loads
      if (res_v) begin
        rp_q[res_w]      <= 1'b0;
        blocked_q[res_w] <= 1'b0;
        case (winst_q[res_w].op)
          OP_BRA: begin
            if (bm_div) begin
              pc_q[res_w]   <= winst_q[res_w].target;
              mask_q[res_w] <= bm_tk;
              n_diverge_o   <= n_diverge_o + 1;
            end else if (bm_tk != '0) pc_q[res_w] <= winst_q[res_w].target;
            else                       pc_q[res_w] <= wpc_q[res_w] + 1'b1;
          end
          OP_JMP:  pc_q[res_w]   <= winst_q[res_w].target;
          OP_EXIT: done_q[res_w] <= 1'b1;
          default: pc_q[res_w]   <= wpc_q[res_w] + 1'b1;
        endcase
      end

      // reconvergence: pop the stack of a waiting warp at its merge point
      for (int w = 0; w < W; w++)
        if (pop_now[w]) begin
          pc_q[w]   <= st_epc[w];
          mask_q[w] <= st_mask[w];
        end
      if (pop_now != '0) n_pop_o <= n_pop_o + 32'($countones(pop_now));

      if (sw_switch)  n_switch_o  <= n_switch_o + 1;
      if (sw_timeout) n_timeout_o <= n_timeout_o + 1;
    end
  end

  assign done_o = (done_q == '1) && !s1_q.v && !s2_q.v && !s3_q.v && !fm_busy && (rp_q == '0);

  // a divergent branch needs two free stack entries
  assert property (@(posedge clk) disable iff (!rst_n) ((st_push1 | st_push2) & st_full) == '0);
endmodule
