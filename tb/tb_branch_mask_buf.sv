// tb_branch_mask_buf: sub-warps of random branches for random warps add their
// threads to the taken / not-taken buffers; buffers, the divergence flag and
// clearing are compared with a reference every cycle.
module tb_branch_mask_buf;
  localparam int N = 8, K = 4, W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic acc, clr;
  logic [1:0] aw, cw, rw;
  logic [N-1:0] al, at;
  logic [N-1:0][1:0] ar;
  logic [K-1:0][N-1:0] tk, nt;
  logic div;
  logic [W-1:0][K-1:0][N-1:0] rtk, rnt;
  int checks = 0, failures = 0;

  branch_mask_buf #(.N(N), .K(K), .W(W)) dut (.clk, .rst_n, .acc_i(acc), .acc_warp_i(aw),
    .acc_lanes_i(al), .acc_row_i(ar), .acc_taken_i(at), .clr_i(clr), .clr_warp_i(cw),
    .rd_warp_i(rw), .taken_o(tk), .not_taken_o(nt), .diverged_o(div));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc = 0; clr = 0; aw = 0; cw = 0; rw = 0; al = 0; at = 0; ar = '0; rtk = '0; rnt = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int w = 0; w < W; w++) begin
        rw = 2'(w); #1;
        checks += 3;
        if (tk != rtk[w]) begin failures++; $display("FAIL taken warp %0d", w); end
        if (nt != rnt[w]) begin failures++; $display("FAIL not-taken warp %0d", w); end
        if (div != ((rtk[w] != 0) && (rnt[w] != 0))) begin failures++; $display("FAIL diverged warp %0d", w); end
      end
      acc = 1'($urandom); clr = ($urandom_range(0, 9) == 0);
      aw = 2'($urandom); cw = 2'($urandom); al = N'($urandom); at = N'($urandom);
      if (t % 3 == 0) at = '1;
      for (int c = 0; c < N; c++) ar[c] = 2'($urandom);
      if (acc)
        for (int c = 0; c < N; c++) if (al[c]) begin
          if (at[c]) rtk[aw][ar[c]][c] = 1'b1; else rnt[aw][ar[c]][c] = 1'b1;
        end
      if (clr) begin rtk[cw] = '0; rnt[cw] = '0; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
