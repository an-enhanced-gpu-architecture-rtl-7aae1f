// mem_ctrl_rbh: open-row DRAM controller for one channel with first-ready
// first-come-first-serve (FR-FCFS) scheduling and row buffer locality hints.
// Requests (one 128-byte line each) wait in a queue kept in arrival order.
// Each cycle at most one request is issued: the oldest one that hits the open
// row of an idle bank, otherwise the oldest one for an idle bank. A row hit
// occupies its bank for T_HIT cycles, a row conflict (or a closed bank) for
// T_CONF cycles. When a request whose hint bit is set completes, its bank is
// held: for up to HOLD = T_CONF - T_HIT cycles only row hits may be issued to
// it, because the request that will reuse the row is expected soon; the first
// hit ends the hold, and when the time runs out conflicting requests go ahead.
// That threshold is the break-even point worked out in the source: waiting any
// longer costs more than the conflict it avoids. A finished request reads its
// line from the DRAM (dram_rd_o, data back combinationally on dram_rdata_i) and
// returns it with its tag on the response port, one per cycle, lowest bank
// first; a bank whose response waits stays busy. Address map (this design's
// choice): line offset [6:0], column [11:7], bank [14:12], row above.
// Counters of hits, conflicts, holds begun, holds ended by a hit and holds that
// expired are outputs for measurement.
module mem_ctrl_rbh #(
  parameter int unsigned NBANK  = 8,
  parameter int unsigned QDEPTH = 16,
  parameter int unsigned T_HIT  = 100,
  parameter int unsigned T_CONF = 300,
  parameter int unsigned HOLD   = T_CONF - T_HIT,
  parameter int unsigned TAG_W  = 8,
  parameter int unsigned LINE_W = 1024,
  parameter int unsigned ADDR_W = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req_valid_i,
  output logic                  req_ready_o,
  input  logic [ADDR_W-1:0]     req_addr_i,
  input  logic                  req_hint_i,
  input  logic [TAG_W-1:0]      req_tag_i,
  output logic                  resp_valid_o,
  output logic [TAG_W-1:0]      resp_tag_o,
  output logic [LINE_W-1:0]     resp_data_o,
  output logic                  dram_rd_o,
  output logic [ADDR_W-1:0]     dram_addr_o,
  input  logic [LINE_W-1:0]     dram_rdata_i,
  output logic [31:0]           n_hit_o,
  output logic [31:0]           n_conf_o,
  output logic [31:0]           n_hold_o,
  output logic [31:0]           n_hold_hit_o,
  output logic [31:0]           n_hold_exp_o
);
  localparam int unsigned BB = $clog2(NBANK);
  localparam int unsigned RW = ADDR_W - 12 - BB;
  localparam int unsigned QB = $clog2(QDEPTH + 1);
  localparam int unsigned CB = $clog2(T_CONF + 1);
  localparam int unsigned HB = $clog2(HOLD + 1);

  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic              hint;
    logic [TAG_W-1:0]  tag;
  } req_t;

  function automatic logic [BB-1:0] bank_of(logic [ADDR_W-1:0] a);
    return a[12 +: BB];
  endfunction
  function automatic logic [RW-1:0] row_of(logic [ADDR_W-1:0] a);
    return a[ADDR_W-1 -: RW];
  endfunction

  req_t              q     [QDEPTH];
  logic [QB-1:0]     qcnt;
  // per-bank state
  logic [NBANK-1:0]  open_q;
  logic [RW-1:0]     orow_q [NBANK];
  logic [NBANK-1:0]  busy_q;
  logic [CB-1:0]     bcnt_q [NBANK];
  req_t              breq_q [NBANK];
  logic [HB-1:0]     hold_q [NBANK];

  // ---------------- issue selection ----------------
  logic            iss;
  logic [QB-1:0]   iss_idx;
  logic            iss_hit;
  always_comb begin
    iss = 1'b0; iss_idx = '0; iss_hit = 1'b0;
    for (int i = 0; i < QDEPTH; i++) begin
      logic [BB-1:0] b;
      b = bank_of(q[i].addr);
      if (!iss && QB'(i) < qcnt && !busy_q[b] && open_q[b] && orow_q[b] == row_of(q[i].addr)) begin
        iss = 1'b1; iss_idx = QB'(i); iss_hit = 1'b1;
      end
    end
    for (int i = 0; i < QDEPTH; i++) begin
      logic [BB-1:0] b;
      b = bank_of(q[i].addr);
      if (!iss && QB'(i) < qcnt && !busy_q[b] && hold_q[b] == '0) begin
        iss = 1'b1; iss_idx = QB'(i); iss_hit = 1'b0;
      end
    end
  end

  // ---------------- completion / response ----------------
  logic            done;
  logic [BB-1:0]   done_b;
  always_comb begin
    done = 1'b0; done_b = '0;
    for (int b = 0; b < NBANK; b++)
      if (!done && busy_q[b] && bcnt_q[b] <= CB'(1)) begin
        done = 1'b1; done_b = BB'(b);
      end
  end
  assign dram_rd_o    = done;
  assign dram_addr_o  = breq_q[done_b].addr;
  assign resp_valid_o = done;
  assign resp_tag_o   = breq_q[done_b].tag;
  assign resp_data_o  = dram_rdata_i;

  assign req_ready_o  = (qcnt < QB'(QDEPTH)) || iss;

  // queue slot for an arriving request and the next occupancy
  logic          push;
  logic [QB-1:0] qpos, qnext;
  assign push  = req_valid_i && req_ready_o;
  assign qpos  = iss ? qcnt - 1'b1 : qcnt;
  assign qnext = push ? qpos + 1'b1 : qpos;

  // queue entry indices (the count is one bit wider than an index)
  localparam int unsigned QI = $clog2(QDEPTH);
  logic [QI-1:0] iss_ix, qpos_ix;
  assign iss_ix  = QI'(iss_idx);
  assign qpos_ix = QI'(qpos);

  logic [BB-1:0] ib;
  assign ib = bank_of(q[iss_ix].addr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qcnt   <= '0;
      open_q <= '0;
      busy_q <= '0;
      for (int b = 0; b < NBANK; b++) begin
        bcnt_q[b] <= '0; hold_q[b] <= '0; orow_q[b] <= '0; breq_q[b] <= '0;
      end
      for (int i = 0; i < QDEPTH; i++) q[i] <= '0;
      n_hit_o <= '0; n_conf_o <= '0; n_hold_o <= '0; n_hold_hit_o <= '0; n_hold_exp_o <= '0;
    end else begin
      // bank timers and holds
      for (int b = 0; b < NBANK; b++) begin
        if (busy_q[b] && bcnt_q[b] > CB'(1)) bcnt_q[b] <= bcnt_q[b] - 1'b1;
        if (!busy_q[b] && hold_q[b] != '0) begin
          hold_q[b] <= hold_q[b] - 1'b1;
          if (hold_q[b] == HB'(1)) n_hold_exp_o <= n_hold_exp_o + 1;
        end
      end
      if (done) begin
        busy_q[done_b] <= 1'b0;
        if (breq_q[done_b].hint) begin
          hold_q[done_b] <= HB'(HOLD);
          n_hold_o       <= n_hold_o + 1;
        end
      end
      // issue
      if (iss) begin
        busy_q[ib]  <= 1'b1;
        breq_q[ib]  <= q[iss_ix];
        open_q[ib]  <= 1'b1;
        orow_q[ib]  <= row_of(q[iss_ix].addr);
        bcnt_q[ib]  <= iss_hit ? CB'(T_HIT) : CB'(T_CONF);
        if (iss_hit) n_hit_o  <= n_hit_o + 1;
        else         n_conf_o <= n_conf_o + 1;
        if (hold_q[ib] != '0) begin
          hold_q[ib]   <= '0;
          n_hold_hit_o <= n_hold_hit_o + 1;
        end
      end
      // queue: remove the issued entry (keep order), append the new one
      if (iss)
        for (int i = 0; i < QDEPTH - 1; i++)
          if (QB'(i) >= iss_idx) q[i] <= q[i+1];
      if (push) q[qpos_ix] <= '{addr: req_addr_i, hint: req_hint_i, tag: req_tag_i};
      qcnt <= qnext;
    end
  end
endmodule
