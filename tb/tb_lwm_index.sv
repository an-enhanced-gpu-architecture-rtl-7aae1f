// tb_lwm_index: index-based search on the large-warp core at its default sizes.
// Each 32-thread row of the core runs one query (32 queries at once). The
// index of a query is one 4KB node that fills a DRAM row: line 0 holds 30
// separator keys, lines 1..31 hold 30 keys each, the 960 keys of the node in
// ascending order being leaf line 1, separator 0, leaf line 2, separator 1, ...
// Unused lanes hold all ones. A search step loads one line, compares the search
// key with every key of the line (key > stored value) and tree traverse turns
// the number of true comparisons into the next address: first the leaf line
// (node + 128 + 128 * count), then the key position (leaf + 4 * count). The
// search key and the node address of a row are themselves read from DRAM
// (query lines at 0 and 4096). The first step's load carries the row buffer
// locality hint, so its DRAM row is held for the dependent second load. The
// position found is written to the scratchpad by a conditional accumulate and
// compared with the position the key was taken from. The search runs twice,
// with and without the hint, and prints the cycle counts and hold statistics.
// DRAM model: node n (at n * 4096) stores key number p as n * 65536 + 64p + 32.
module tb_lwm_index;
  import gpu_pkg::*;
  localparam int unsigned N = 32, K = 8, W = 4;
  localparam int unsigned Q = W*K;
  localparam int unsigned MAXCYC = 1000000;

  logic clk = 1'b0, rst_n = 1'b0, launch = 1'b0;
  always #5 clk = ~clk;

  logic              fetch_v;
  logic [1:0]        fetch_w;
  logic [PC_W-1:0]   fetch_pc;
  inst_t             inst;
  logic              dram_rd;
  logic [31:0]       dram_addr;
  logic [N*32-1:0]   dram_data;
  logic              spm_re = 1'b0;
  logic [31:0]       spm_raddr = '0, spm_rdata;
  logic              done;
  logic [31:0]       c_fetch, c_sw, c_thr, c_fstall, c_ilk, c_div, c_pop, c_single, c_row,
                     c_switch, c_tmo, c_cacc, c_ttrav, c_hit, c_conf, c_hold, c_hhit, c_hexp;

  lwm_core dut (
    .clk, .rst_n, .launch_i(launch), .launch_pc_i('0),
    .fetch_valid_o(fetch_v), .fetch_warp_o(fetch_w), .fetch_pc_o(fetch_pc), .inst_i(inst),
    .dram_rd_o(dram_rd), .dram_addr_o(dram_addr), .dram_rdata_i(dram_data),
    .spm_re_i(spm_re), .spm_raddr_i(spm_raddr), .spm_rdata_o(spm_rdata), .done_o(done),
    .n_fetch_o(c_fetch), .n_subwarp_o(c_sw), .n_thread_o(c_thr), .n_fetch_stall_o(c_fstall),
    .n_interlock_o(c_ilk), .n_diverge_o(c_div), .n_pop_o(c_pop), .n_single_o(c_single),
    .n_row_sw_o(c_row), .n_switch_o(c_switch), .n_timeout_o(c_tmo), .n_cacc_o(c_cacc),
    .n_ttrav_o(c_ttrav), .n_row_hit_o(c_hit), .n_row_conf_o(c_conf), .n_hold_o(c_hold),
    .n_hold_hit_o(c_hhit), .n_hold_exp_o(c_hexp));

  // query q searches node 2 + q for its key number target(q)
  function automatic int node_of(int q);
    return 2 + q;
  endfunction
  function automatic int target(int q, int pass);
    return (q * 337 + pass * 101 + 13) % 960;
  endfunction
  function automatic logic [31:0] key(int n, int p);
    return 32'(n) * 32'd65536 + 32'(64 * p + 32);
  endfunction

  int pass_no;
  function automatic logic [31:0] word(logic [31:0] line, int c);
    int n, m;
    if (line < 32) return key(node_of(int'(line)), target(int'(line), pass_no));
    if (line < 64) return 32'(node_of(int'(line) - 32) * 4096);
    n = int'(line) / 32; m = int'(line) % 32;
    if (c >= 30)  return 32'hFFFF_FFFF;
    if (m == 0)   return key(n, 31 * c + 30);
    return key(n, 31 * (m - 1) + c);
  endfunction
  always_comb
    for (int c = 0; c < N; c++) dram_data[c*32 +: 32] = word(dram_addr >> 7, c);

  // ---------------- program ----------------
  logic hint_on;
  function automatic inst_t mk(op_e op, int rd, int rs1, int rs2, int imm, bit hint);
    inst_t i;
    i.op = op; i.rd = 4'(rd); i.rs1 = 4'(rs1); i.rs2 = 4'(rs2); i.imm = 16'(imm);
    i.target = '0; i.rpc = '0; i.hint = hint;
    return i;
  endfunction
  always_comb begin
    case (fetch_pc)
      0:  inst = mk(OP_TID,    1, 0, 0, 0, 0);
      1:  inst = mk(OP_ADD,    4, 1, 1, 0, 0);
      2:  inst = mk(OP_ADD,    4, 4, 4, 0, 0);      // r4 = 4 tid: row g at g * 128
      3:  inst = mk(OP_LD,     3, 4, 0, 0, 0);      // search key
      4:  inst = mk(OP_LI,     2, 0, 0, 4096, 0);
      5:  inst = mk(OP_ADD,    5, 4, 2, 0, 0);
      6:  inst = mk(OP_LD,     6, 5, 0, 0, 0);      // node address
      7:  inst = mk(OP_LD,     7, 6, 0, 0, hint_on); // separator line, hinted
      8:  inst = mk(OP_SETGT,  0, 3, 7, 0, 0);
      9:  inst = mk(OP_LI,     8, 0, 0, 128, 0);
      10: inst = mk(OP_ADD,    9, 6, 8, 0, 0);
      11: inst = mk(OP_TTRAV, 10, 9, 8, 0, 0);      // leaf line address
      12: inst = mk(OP_LD,    11, 10, 0, 0, 0);
      13: inst = mk(OP_SETGT,  0, 3, 11, 0, 0);
      14: inst = mk(OP_LI,    12, 0, 0, 4, 0);
      15: inst = mk(OP_TTRAV, 13, 10, 12, 0, 0);    // key position
      16: inst = mk(OP_LI,    14, 0, 0, 16'hFFFF, 0);
      17: inst = mk(OP_SETLT,  0, 1, 14, 0, 0);     // all threads true
      18: inst = mk(OP_CACC,   0, 4, 13, 0, 0);     // result to scratchpad
      default: inst = mk(OP_EXIT, 0, 0, 0, 0, 0);
    endcase
  end

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic spm_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); spm_re = 1'b1; spm_raddr = a;
    @(negedge clk); spm_re = 1'b0; d = spm_rdata;
  endtask

  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after %0d cycles", MAXCYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int pass, input logic h);
    int start;
    pass_no = pass; hint_on = h;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); launch = 1'b1;
    @(negedge clk); launch = 1'b0;
    start = cycles;
    wait (done);
    $display("hint=%0d: %0d cycles, hit=%0d conf=%0d hold=%0d holdhit=%0d holdexp=%0d",
             h, cycles - start, c_hit, c_conf, c_hold, c_hhit, c_hexp);
    for (int q = 0; q < int'(Q); q++) begin
      int p, b, r;
      logic [31:0] exp_a, got;
      p = target(q, pass); b = p / 31; r = p % 31;
      exp_a = 32'(node_of(q) * 4096 + (1 + b) * 128 + 4 * r);
      for (int c = 0; c < N; c += 31) begin
        spm_read(32'(q * 128 + 4 * c), got);
        check(got == exp_a, $sformatf("pass %0d query %0d lane %0d: %h vs %h", pass, q, c, got, exp_a));
      end
    end
    check(c_ttrav == 32'(2 * Q), "two tree traverses per query");
    check(c_hit + c_conf == 32'(4 * Q), "four line reads per query");
    check(c_hold == (h ? 32'(Q) : 32'd0), "one hold per hinted load");
    if (h) check(c_hhit > 0, "a held row served the dependent load");
  endtask

  initial begin
    run(0, 1'b1);
    run(1, 1'b0);
    run(2, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
