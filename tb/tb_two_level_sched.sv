// tb_two_level_sched: 8 warps in 2 fetch groups of 4.
// Directed: round-robin inside the prioritised group, the other group only
// fills in when the prioritised one has no ready warp, a group switch when all
// warps of the prioritised group are stalled (the old group becomes lowest),
// and the timeout switch after TIMEOUT fetches. Random: ready / stalled
// patterns against a reference model of the two-level round-robin policy.
module tb_two_level_sched;
  localparam int W = 8, FG = 4, NG = 2, TO = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [W-1:0] ready, stalled;
  logic take, gv, sw, tmo;
  logic [2:0] g, pg;
  int checks = 0, failures = 0;

  two_level_sched #(.W(W), .FG(FG), .TIMEOUT(TO)) dut (.clk, .rst_n, .ready_i(ready), .stalled_i(stalled),
    .take_i(take), .grant_valid_o(gv), .grant_o(g), .prio_group_o(pg), .switch_o(sw), .timeout_o(tmo));

  // reference model
  int m_pg, m_ptr [NG], m_cnt;
  function automatic int m_grant(output bit valid);
    valid = 0;
    for (int gi = 0; gi < NG; gi++) begin
      int grp; grp = (m_pg + gi) % NG;
      for (int oi = 0; oi < FG; oi++) begin
        int o; o = (m_ptr[grp] + oi) % FG;
        if (ready[grp*FG + o]) begin valid = 1; return grp*FG + o; end
      end
    end
    return 0;
  endfunction

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seq [4] = '{0, 1, 2, 3};
    ready = '1; stalled = '0; take = 1;
    m_pg = 0; m_ptr = '{0, 0}; m_cnt = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // round-robin inside group 0
    for (int i = 0; i < 4; i++) begin
      #1 chk(gv && g == 3'(seq[i]) && pg == 0, $sformatf("round robin step %0d got %0d", i, g));
      @(negedge clk);
    end
    // group 0 busy (not ready, not stalled): group 1 fills in, no switch
    ready = 8'hF0; #1;
    chk(gv && g == 4 && !sw, "lower group fills idle slot without switching");
    @(negedge clk);
    // group 0 all stalled: switch to group 1, group 0 becomes lowest
    stalled = 8'h0F; ready = 8'hFF; #1;
    chk(sw && !tmo, "switch when the prioritised group is all stalled");
    @(negedge clk); stalled = '0; #1;
    chk(pg == 1 && gv && g == 5, $sformatf("group 1 prioritised, next warp 5 (got %0d)", g));
    // timeout: keep fetching from group 1 until TO fetches, then switch
    begin
      int n; n = 0;
      while (!tmo && n < 20) begin @(negedge clk); n++; #1; end
      chk(tmo && n == TO, $sformatf("timeout after %0d fetches (got %0d)", TO, n));
      @(negedge clk); #1;
      chk(pg == 0, "timeout moves priority to group 0");
    end
    // random against the model
    take = 0; ready = '0; stalled = '0;
    rst_n = 0; @(negedge clk); rst_n = 1;
    m_pg = 0; m_ptr = '{0, 0}; m_cnt = 0;
    for (int t = 0; t < 3000; t++) begin
      bit mv; int mg; bit mall;
      ready = 8'($urandom); stalled = 8'($urandom) & 8'($urandom); take = 1'($urandom);
      if (t % 4 == 0) stalled[m_pg*FG +: FG] = '1;
      #1;
      mg = m_grant(mv);
      chk(gv == mv && (!mv || g == 3'(mg)), $sformatf("grant step %0d: %0d/%0d vs %0d/%0d", t, gv, g, mv, mg));
      mall = (stalled[m_pg*FG +: FG] == '1);
      chk(sw == (mall || m_cnt >= TO), $sformatf("switch step %0d", t));
      if (take && mv) m_ptr[mg / FG] = (mg % FG + 1) % FG;
      if (mall || m_cnt >= TO) begin m_pg = (m_pg + 1) % NG; m_cnt = 0; end
      else if (take && mv && mg / FG == m_pg) m_cnt++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
