// tb_lwm_core_full: the end-to-end kernel of tb_lwm_core run on the core with
// every parameter at its default (4 large warps of 8 x 32 threads, fetch groups
// of one large warp, timeout 32768). The kernel is far shorter than the
// timeout, so the timeout is expected not to fire here.
// A 26-instruction kernel runs on every thread of all large warps. It loads one
// pseudo-random 16-bit value per thread from DRAM (hinted load), splits the
// threads with a data-dependent branch (if-else that reconverges), gathers each
// path's results into the scratchpad with conditional accumulate, uses tree
// traverse to compute a second, dependent load address, and finally
// conditionally accumulates the second load's data. The DRAM is a behavioural
// model: word c of line L is f(L, c). The testbench recomputes every scratchpad
// word, the number of thread-instructions and checks that each mechanism
// (divergence, reconvergence pops, interlocks, fetch stalls, single and row
// sub-warps, group switches and timeouts, row hits / conflicts / holds) happened.
module tb_lwm_core_full;
  import gpu_pkg::*;
  localparam int unsigned N = 32, K = 8, W = 4;
  localparam int unsigned MAXCYC = 400000;

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

  // ---------------- DRAM model ----------------
  function automatic logic [31:0] f(logic [31:0] line, int c);
    logic [31:0] h;
    h = line * 32'h9E3779B1 + 32'(c) * 32'h85EBCA77 + 32'h1234;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    return {16'd0, h[31:16]};
  endfunction
  always_comb
    for (int c = 0; c < N; c++) dram_data[c*32 +: 32] = f(dram_addr >> 7, c);

  // ---------------- program ----------------
  function automatic inst_t mk(op_e op, int rd, int rs1, int rs2, int imm, int tgt, int rpc, bit hint);
    inst_t i;
    i.op = op; i.rd = 4'(rd); i.rs1 = 4'(rs1); i.rs2 = 4'(rs2); i.imm = 16'(imm);
    i.target = PC_W'(tgt); i.rpc = PC_W'(rpc); i.hint = hint;
    return i;
  endfunction
  always_comb begin
    case (fetch_pc)
      0:  inst = mk(OP_TID,   1, 0, 0, 0, 0, 0, 0);
      1:  inst = mk(OP_ADD,   4, 1, 1, 0, 0, 0, 0);
      2:  inst = mk(OP_ADD,   4, 4, 4, 0, 0, 0, 0);
      3:  inst = mk(OP_LD,    3, 4, 0, 0, 0, 0, 1);
      4:  inst = mk(OP_LI,    5, 0, 0, 16'h8000, 0, 0, 0);
      5:  inst = mk(OP_SETLT, 0, 3, 5, 0, 0, 0, 0);
      6:  inst = mk(OP_BRA,   0, 0, 0, 0, 9, 10, 0);
      7:  inst = mk(OP_ADDI,  6, 3, 0, 1, 0, 0, 0);
      8:  inst = mk(OP_JMP,   0, 0, 0, 0, 10, 0, 0);
      9:  inst = mk(OP_ADDI,  6, 3, 0, 2, 0, 0, 0);
      10: inst = mk(OP_CACC,  7, 4, 6, 0, 0, 0, 0);
      11: inst = mk(OP_SETGT, 0, 3, 5, 0, 0, 0, 0);
      12: inst = mk(OP_LI,   15, 0, 0, 4096, 0, 0, 0);
      13: inst = mk(OP_ADD,  16, 4, 15, 0, 0, 0, 0);
      14: inst = mk(OP_CACC,  7, 16, 6, 0, 0, 0, 0);
      15: inst = mk(OP_LI,    9, 0, 0, 32, 0, 0, 0);
      16: inst = mk(OP_TTRAV,10, 4, 9, 0, 0, 0, 0);
      17: inst = mk(OP_LI,   12, 0, 0, 16'h8000, 0, 0, 0);
      18: inst = mk(OP_ADD,  13, 10, 12, 0, 0, 0, 0);
      19: inst = mk(OP_LD,   11, 13, 0, 0, 0, 0, 0);
      20: inst = mk(OP_LI,   14, 0, 0, 16'hFFFF, 0, 0, 0);
      21: inst = mk(OP_SETLT, 0, 1, 14, 0, 0, 0, 0);
      22: inst = mk(OP_LI,    2, 0, 0, 8192, 0, 0, 0);
      23: inst = mk(OP_ADD,   8, 4, 2, 0, 0, 0, 0);
      24: inst = mk(OP_CACC,  7, 8, 11, 0, 0, 0, 0);
      default: inst = mk(OP_EXIT, 0, 0, 0, 0, 0, 0, 0);
    endcase
  end

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic spm_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); spm_re = 1'b1; spm_raddr = a;
    @(negedge clk); spm_re = 1'b0; d = spm_rdata;
  endtask

  // watchdog
  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after %0d cycles", MAXCYC);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int start;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); launch = 1'b1;
    @(negedge clk); launch = 1'b0;
    start = cycles;
    wait (done);
    $display("kernel finished in %0d cycles", cycles - start);
    for (int g = 0; g < W*K; g++) begin
      logic [31:0] d [N];
      logic [31:0] r6 [N];
      logic [31:0] got, line2;
      int n1, n2;
      n1 = 0; n2 = 0;
      for (int c = 0; c < N; c++) begin
        d[c]  = f(32'(g), c);
        r6[c] = (d[c] < 32'h8000) ? d[c] + 2 : d[c] + 1;
      end
      for (int c = 0; c < N; c++) if (d[c] < 32'h8000) begin
        spm_read(32'(g*128 + 4*n1), got);
        check(got == r6[c], $sformatf("row %0d taken value %0d: %h vs %h", g, n1, got, r6[c]));
        n1++;
      end
      for (int c = 0; c < N; c++) if (d[c] > 32'h8000) begin
        spm_read(32'(4096 + g*128 + 4*n2), got);
        check(got == r6[c], $sformatf("row %0d not-taken value %0d: %h vs %h", g, n2, got, r6[c]));
        n2++;
      end
      line2 = (32'(g*128 + n2*32) + 32'h8000) >> 7;
      for (int c = 0; c < N; c++) begin
        spm_read(32'(8192 + g*128 + 4*c), got);
        check(got == f(line2, c), $sformatf("row %0d second load lane %0d: %h vs %h", g, c, got, f(line2, c)));
      end
    end
    // thread-instructions: 22 full-mask instructions, the branch and one of the two paths
    check(c_thr == 32'(W*K*N*23), $sformatf("thread-instructions %0d vs %0d", c_thr, W*K*N*23));
    $display("fetch=%0d subwarps=%0d threads=%0d fstall=%0d interlock=%0d diverge=%0d pop=%0d single=%0d row=%0d",
             c_fetch, c_sw, c_thr, c_fstall, c_ilk, c_div, c_pop, c_single, c_row);
    $display("switch=%0d timeout=%0d cacc=%0d ttrav=%0d hit=%0d conf=%0d hold=%0d holdhit=%0d holdexp=%0d",
             c_switch, c_tmo, c_cacc, c_ttrav, c_hit, c_conf, c_hold, c_hhit, c_hexp);
    check(c_fetch == 32'(W*26), "one fetch per instruction per warp (26 with both branch paths)");
    check(c_div == 32'(W), "every warp diverges once");
    check(c_pop == 32'(2*W), "two reconvergence pops per warp");
    check(c_fstall > 0, "fetch stalled by sub-warping");
    check(c_ilk > 0, "dependency interlock");
    check(c_single == 32'(2*W), "jump and exit use one sub-warp");
    check(c_row == 32'(W*K*6), "memory-type instructions use one sub-warp per row");
    check(c_cacc == 32'(W*K*3), "conditional accumulates");
    check(c_ttrav == 32'(W*K), "tree traverses");
    check(c_switch > 0, "fetch group switch");
    check(c_tmo == 0, "no timeout in a kernel shorter than the timeout");
    check(c_hit > 0 && c_conf > 0, "row hits and conflicts");
    check(c_hit + c_conf == 32'(2*W*K), "one DRAM access per row per load");
    check(c_hold > 0, "row held after hinted load");
    check(c_hhit > 0, "held row reused");
    check(c_hexp > 0, "hold expired");
    // packing: the two branch paths together need fewer than two full sets of rows
    check(c_sw < 32'(W*(22*K + 2*K)), "sub-warp packing saves issue slots");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
