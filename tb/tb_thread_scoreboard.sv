// tb_thread_scoreboard: random set and clear traffic on all three ports
// against a bit-array reference, checked every cycle.
module tb_thread_scoreboard;
  localparam int N = 8, K = 4, W = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic set, clr, ldc;
  logic [0:0] sw, cw, lw;
  logic [N-1:0] sl, cl, ll;
  logic [N-1:0][1:0] sr, cr;
  logic [1:0] lr;
  logic [W-1:0][K-1:0][N-1:0] dep, ref_q;
  int checks = 0, failures = 0;

  thread_scoreboard #(.N(N), .K(K), .W(W)) dut (.clk, .rst_n,
    .set_i(set), .set_warp_i(sw), .set_lanes_i(sl), .set_row_i(sr),
    .clr_i(clr), .clr_warp_i(cw), .clr_lanes_i(cl), .clr_row_i(cr),
    .ld_clr_i(ldc), .ld_clr_warp_i(lw), .ld_clr_row_i(lr), .ld_clr_lanes_i(ll), .dep_o(dep));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set = 0; clr = 0; ldc = 0; ref_q = '0;
    sw = 0; cw = 0; lw = 0; sl = 0; cl = 0; ll = 0; sr = 0; cr = 0; lr = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks++;
      if (dep != ref_q) begin failures++; $display("FAIL cycle %0d", t); end
      set = 1'($urandom); clr = 1'($urandom); ldc = 1'($urandom);
      sw = 1'($urandom); cw = 1'($urandom); lw = 1'($urandom);
      sl = N'($urandom); cl = N'($urandom); ll = N'($urandom); lr = 2'($urandom);
      for (int c = 0; c < N; c++) begin sr[c] = 2'($urandom); cr[c] = 2'($urandom); end
      for (int c = 0; c < N; c++) begin
        if (clr && cl[c]) ref_q[cw][cr[c]][c] = 1'b0;
        if (ldc && ll[c]) ref_q[lw][lr][c] = 1'b0;
        if (set && sl[c]) ref_q[sw][sr[c]][c] = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
