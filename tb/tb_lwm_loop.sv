// tb_lwm_loop: loop divergence on the large-warp core at its default sizes.
// Every thread runs a counted loop whose trip count (1..20) it loads from
// DRAM, so threads leave the loop at many different iterations and the loop's
// backward branch diverges again and again. Each thread sums 1..n and the sums
// are gathered into the scratchpad with conditional accumulate (all predicates
// true), one 128-byte block per 32-thread row, in lane order. Checked: every
// sum, the thread-instruction count, that the branch diverged, and that each
// warp needed exactly one reconvergence pop: a loop exit must not grow the
// divergence stack by one entry per iteration (20 iterations would not fit in
// 16 entries). DRAM model: word c of line L is ((7L + 3c) mod 20) + 1.
module tb_lwm_loop;
  import gpu_pkg::*;
  localparam int unsigned N = 32, K = 8, W = 4;
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

  function automatic int trips(int line, int c);
    return ((7 * line + 3 * c) % 20) + 1;
  endfunction
  always_comb
    for (int c = 0; c < N; c++) dram_data[c*32 +: 32] = 32'(trips(int'(dram_addr >> 7), c));

  function automatic inst_t mk(op_e op, int rd, int rs1, int rs2, int imm, int tgt, int rpc);
    inst_t i;
    i.op = op; i.rd = 4'(rd); i.rs1 = 4'(rs1); i.rs2 = 4'(rs2); i.imm = 16'(imm);
    i.target = PC_W'(tgt); i.rpc = PC_W'(rpc); i.hint = 1'b0;
    return i;
  endfunction
  always_comb begin
    case (fetch_pc)
      0:  inst = mk(OP_TID,   1, 0, 0, 0, 0, 0);
      1:  inst = mk(OP_ADD,   4, 1, 1, 0, 0, 0);
      2:  inst = mk(OP_ADD,   4, 4, 4, 0, 0, 0);         // r4 = 4 tid
      3:  inst = mk(OP_LD,    5, 4, 0, 0, 0, 0);         // trip count
      4:  inst = mk(OP_LI,    2, 0, 0, 0, 0, 0);         // i = 0
      5:  inst = mk(OP_LI,    7, 0, 0, 16'hFFFF, 0, 0);
      6:  inst = mk(OP_LI,    6, 0, 0, 0, 0, 0);         // sum = 0
      7:  inst = mk(OP_ADDI,  2, 2, 0, 1, 0, 0);         // loop: i++
      8:  inst = mk(OP_ADD,   6, 6, 2, 0, 0, 0);         // sum += i
      9:  inst = mk(OP_SETLT, 0, 2, 5, 0, 0, 0);
      10: inst = mk(OP_BRA,   0, 0, 0, 0, 7, 11);        // while (i < n)
      11: inst = mk(OP_SETLT, 0, 1, 7, 0, 0, 0);         // all threads true
      12: inst = mk(OP_CACC,  0, 4, 6, 0, 0, 0);
      default: inst = mk(OP_EXIT, 0, 0, 0, 0, 0, 0);
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

  initial begin
    longint thr;
    int start;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); launch = 1'b1;
    @(negedge clk); launch = 1'b0;
    start = cycles;
    wait (done);
    thr = 0;
    for (int g = 0; g < int'(W*K); g++)
      for (int c = 0; c < int'(N); c++) begin
        int n;
        logic [31:0] got;
        n = trips(g, c);
        thr += 7 + 4 * n + 2;
        spm_read(32'(g * 128 + 4 * c), got);
        check(got == 32'(n * (n + 1) / 2), $sformatf("row %0d lane %0d: sum %0d vs %0d", g, c, got, n * (n + 1) / 2));
      end
    $display("%0d cycles, fetch=%0d subwarps=%0d diverge=%0d pop=%0d", cycles - start, c_fetch, c_sw, c_div, c_pop);
    check(c_thr == 32'(thr), $sformatf("thread-instructions %0d vs %0d", c_thr, thr));
    check(c_div > 32'(W), "loop branch diverged repeatedly");
    check(c_pop == 32'(W), "one reconvergence pop per warp");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
