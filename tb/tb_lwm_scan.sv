// tb_lwm_scan: full table scan on the large-warp core at its default sizes.
// A column of 32-bit values (8 lines of 32 values per 32-thread row, 8192
// values in all) is streamed from DRAM. Each thread compares its value with a
// maximum (WHERE value < max) and conditional accumulate appends the passing
// values of its 32-thread row to that row's 1KB output area of the
// scratchpad; the output pointer advances by 4 bytes per written value. The
// loop uses a backward branch on a per-thread counter. The scan is run at three
// selectivities, 1/2, 1/8 and 1/1024, each on different data, and every output
// word is recomputed and compared in order. The DRAM model gives word c of line
// L as a hash of (L, c) with 16 significant bits, so a max of 2**16 * s selects
// a fraction s of the values on average. Also checked: one conditional
// accumulate and one DRAM line per row per iteration and the count of thread-
// instructions (the exit is one sub-warp with no lanes and adds none).
module tb_lwm_scan;
  import gpu_pkg::*;
  localparam int unsigned N = 32, K = 8, W = 4;
  localparam int unsigned ITER = 8;
  localparam int unsigned MAXCYC = 2000000;

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

  function automatic logic [31:0] f(logic [31:0] line, int c);
    logic [31:0] h;
    h = line * 32'h7FEB352D + 32'(c) * 32'h846CA68B + 32'h55AA;
    h = h ^ (h >> 16);
    h = h * 32'h2C1B3C6D;
    return {16'd0, h[31:16]};
  endfunction
  always_comb
    for (int c = 0; c < N; c++) dram_data[c*32 +: 32] = f(dram_addr >> 7, c);

  // ---------------- program ----------------
  logic [15:0] data_base, max_val;
  function automatic inst_t mk(op_e op, int rd, int rs1, int rs2, int imm, int tgt, int rpc);
    inst_t i;
    i.op = op; i.rd = 4'(rd); i.rs1 = 4'(rs1); i.rs2 = 4'(rs2); i.imm = 16'(imm);
    i.target = PC_W'(tgt); i.rpc = PC_W'(rpc); i.hint = 1'b0;
    return i;
  endfunction
  always_comb begin
    case (fetch_pc)
      0:  inst = mk(OP_TID,   1, 0, 0, 0, 0, 0);
      1:  inst = mk(OP_ADD,   4, 1, 1, 0, 0, 0);          // r4 = 2 tid
      2:  inst = mk(OP_ADD,   4, 4, 4, 0, 0, 0);          // r4 = 4 tid (row g starts at g*128)
      3:  inst = mk(OP_ADD,   5, 4, 4, 0, 0, 0);          // r5 = 8 tid
      4:  inst = mk(OP_ADD,   5, 5, 5, 0, 0, 0);
      5:  inst = mk(OP_ADD,   5, 5, 5, 0, 0, 0);          // r5 = 32 tid (row g output at g*1024)
      6:  inst = mk(OP_LI,    6, 0, 0, data_base, 0, 0);
      7:  inst = mk(OP_ADD,   4, 4, 6, 0, 0, 0);          // data pointer
      8:  inst = mk(OP_LI,    7, 0, 0, W*K*128, 0, 0);    // stride between iterations
      9:  inst = mk(OP_LI,    8, 0, 0, 0, 0, 0);          // loop counter
      10: inst = mk(OP_LI,    9, 0, 0, ITER, 0, 0);
      11: inst = mk(OP_LI,   10, 0, 0, max_val, 0, 0);
      12: inst = mk(OP_LD,    3, 4, 0, 0, 0, 0);          // loop: value
      13: inst = mk(OP_SETLT, 0, 3, 10, 0, 0, 0);         // WHERE value < max
      14: inst = mk(OP_CACC, 11, 5, 3, 0, 0, 0);          // append, r11 = count
      15: inst = mk(OP_ADD,  11, 11, 11, 0, 0, 0);
      16: inst = mk(OP_ADD,  11, 11, 11, 0, 0, 0);        // bytes written
      17: inst = mk(OP_ADD,   5, 5, 11, 0, 0, 0);
      18: inst = mk(OP_ADD,   4, 4, 7, 0, 0, 0);
      19: inst = mk(OP_ADDI,  8, 8, 0, 1, 0, 0);
      20: inst = mk(OP_SETLT, 0, 8, 9, 0, 0, 0);
      21: inst = mk(OP_BRA,   0, 0, 0, 0, 12, 22);
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

  task automatic run(input logic [15:0] base, input logic [15:0] mx);
    int start, total;
    data_base = base; max_val = mx;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); launch = 1'b1;
    @(negedge clk); launch = 1'b0;
    start = cycles;
    wait (done);
    total = 0;
    for (int g = 0; g < W*K; g++) begin
      int n;
      logic [31:0] v, got;
      n = 0;
      for (int it = 0; it < ITER; it++)
        for (int c = 0; c < N; c++) begin
          v = f((32'(base) + 32'(g*128 + it*W*K*128)) >> 7, c);
          if (v < 32'(mx)) begin
            spm_read(32'(g*1024 + 4*n), got);
            check(got == v, $sformatf("max %0d row %0d output %0d: %h vs %h", mx, g, n, got, v));
            n++;
          end
        end
      total += n;
    end
    $display("max=%0d: %0d of %0d values pass, %0d cycles, subwarps=%0d hit=%0d conf=%0d",
             mx, total, W*K*N*ITER, cycles - start, c_sw, c_hit, c_conf);
    check(c_cacc == 32'(W*K*ITER), "one conditional accumulate per row per iteration");
    check(c_hit + c_conf == 32'(W*K*ITER), "one DRAM line per row per iteration");
    check(c_thr == 32'(W*K*N*(12 + 10*ITER)), $sformatf("thread-instructions %0d", c_thr));
    check(c_div == 0, "uniform loop branch never diverges");
  endtask

  initial begin
    run(16'h0000, 16'h8000);   // 1/2
    run(16'h4000, 16'h2000);   // 1/8
    run(16'h8000, 16'h0040);   // 1/1024
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
