// tb_mem_ctrl_rbh: DRAM controller with short latencies (hit 10, conflict 30,
// hold 20 cycles). Directed cases check the exact latency of a conflict
// (T_CONF + 1 cycles from request to response, one cycle spent in the queue)
// and of a hit (T_HIT + 1), first-ready ordering (a younger row hit overtakes
// an older conflict), and the hint bit: after a hinted request the bank is held
// so a conflicting request waits out the hold, a row hit arriving during the
// hold is served first, and without a hint nothing is held. A random phase
// checks every request is answered exactly once with its own line.
module tb_mem_ctrl_rbh;
  localparam int TH = 10, TC = 30, HOLD = TC - TH;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rv, rr, hint, pv, drd;
  logic [31:0] ra, da;
  logic [7:0] tag, ptag;
  logic [63:0] pdata, ddata;
  logic [31:0] nh, nc, nho, nhh, nhe;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  mem_ctrl_rbh #(.NBANK(8), .QDEPTH(8), .T_HIT(TH), .T_CONF(TC), .TAG_W(8), .LINE_W(64)) dut (
    .clk, .rst_n, .req_valid_i(rv), .req_ready_o(rr), .req_addr_i(ra), .req_hint_i(hint), .req_tag_i(tag),
    .resp_valid_o(pv), .resp_tag_o(ptag), .resp_data_o(pdata), .dram_rd_o(drd), .dram_addr_o(da),
    .dram_rdata_i(ddata), .n_hit_o(nh), .n_conf_o(nc), .n_hold_o(nho), .n_hold_hit_o(nhh), .n_hold_exp_o(nhe));

  assign ddata = {da, ~da};

  // response log
  int rtime [256];
  int rorder [$];
  always @(posedge clk) if (pv) begin
    rtime[ptag] = cyc;
    rorder.push_back(int'(ptag));
    checks++;
    if (pdata != {da, ~da}) begin failures++; $display("FAIL data for tag %0d", ptag); end
  end

  function automatic logic [31:0] A(int bank, int row, int col);
    return 32'(row) << 15 | 32'(bank) << 12 | 32'(col) << 7;
  endfunction

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  int t0;
  task automatic send(logic [31:0] a, bit h, int tg);
    @(negedge clk);
    rv = 1; ra = a; hint = h; tag = 8'(tg);
    t0 = cyc;
    @(negedge clk);
    rv = 0;
  endtask

  task automatic idle(int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ts [8];
    rv = 0; ra = 0; hint = 0; tag = 0;
    for (int i = 0; i < 256; i++) rtime[i] = -1;
    repeat (2) @(negedge clk); rst_n = 1;
    // 1) closed bank: conflict latency; 2) same row: hit latency
    send(A(0, 1, 0), 0, 1); ts[1] = t0; idle(TC + 5);
    chk(rtime[1] - ts[1] == TC + 1, $sformatf("conflict latency %0d", rtime[1] - ts[1]));
    send(A(0, 1, 3), 0, 2); ts[2] = t0; idle(TH + 5);
    chk(rtime[2] - ts[2] == TH + 1, $sformatf("hit latency %0d", rtime[2] - ts[2]));
    // 3) first-ready: bank 0 busy on row 1; queue an older conflict then a younger hit
    send(A(0, 1, 4), 0, 3);
    send(A(0, 5, 0), 0, 4);
    send(A(0, 1, 5), 0, 5);
    idle(TC * 3);
    chk(rorder.size() >= 3 && rorder[rorder.size()-3] == 3 && rorder[rorder.size()-2] == 5 &&
        rorder[rorder.size()-1] == 4, "row hit overtakes older conflict");
    // 4) no hint: a conflict goes right after completion
    send(A(1, 2, 0), 0, 10); idle(2);
    send(A(1, 3, 0), 0, 11); idle(TC * 3);
    chk(rtime[11] - rtime[10] == TC + 1, $sformatf("no hold without hint (%0d)", rtime[11] - rtime[10]));
    // 5) hint: the conflicting request waits out the hold
    send(A(2, 2, 0), 1, 20); idle(2);
    send(A(2, 3, 0), 0, 21); idle(TC * 4);
    chk(rtime[21] - rtime[20] == HOLD + TC + 1, $sformatf("hold delays conflict (%0d)", rtime[21] - rtime[20]));
    chk(nhe == 1, "hold expired once");
    // 6) hint, then a conflict, then the anticipated hit during the hold: hit first
    send(A(3, 2, 0), 1, 30); idle(2);
    send(A(3, 3, 0), 0, 31);
    wait (rtime[30] >= 0); idle(5);
    send(A(3, 2, 9), 0, 32); idle(TC * 4);
    chk(rtime[32] < rtime[31], "held row serves the hinted follow-up first");
    chk(rtime[32] - rtime[30] < TC, "follow-up is a fast row hit");
    chk(nhh == 1, "hold ended by a hit");
    chk(nho == 2, "two holds started");
    // 7) random traffic: every request answered exactly once
    rorder.delete();
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      rv = 1; ra = A($urandom_range(0, 7), $urandom_range(0, 3), $urandom_range(0, 31));
      hint = 1'($urandom); tag = 8'(100 + (i % 100));
      @(posedge clk); while (!rr) @(posedge clk);
      @(negedge clk); rv = 0;
      if (i % 100 == 99) begin
        idle(3000);
        chk(rorder.size() == 100, $sformatf("100 responses (%0d)", rorder.size()));
        rorder.sort();
        for (int k = 0; k < 100 && k < rorder.size(); k++) chk(rorder[k] == 100 + k, "each tag once");
        rorder.delete();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
