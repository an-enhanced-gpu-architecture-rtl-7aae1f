// tb_subwarp_former: sub-warp formation on a 4-lane, 8-row large warp.
// 1) The worked example of the source: the mask below must become exactly four
//    sub-warps on four consecutive cycles, with lanes and row IDs
//    (rows 0 0 2 1), (1 2 3 2), (6 5 4 4), (7 - 7 5).
// 2) Random masks in pack mode: every thread is issued exactly once, never two
//    per lane in one sub-warp, and the number of sub-warps equals the fullest column.
// 3) Row mode issues one whole row per cycle; single mode one empty sub-warp.
// 4) Interlock: a thread whose dependency bit is set is not issued until it clears.
module tb_subwarp_former;
  import gpu_pkg::*;
  localparam int N = 4, K = 8, W = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  logic [1:0] warp_i, warp_o;
  logic [K-1:0][N-1:0] mask, dep;
  sw_mode_e mode;
  logic busy, ready, ilk, v, last;
  logic [N-1:0] lanes;
  logic [N-1:0][2:0] row;
  int checks = 0, failures = 0;

  subwarp_former #(.N(N), .K(K), .W(W)) dut (.clk, .rst_n, .start_i(start), .warp_i(warp_i),
    .mask_i(mask), .mode_i(mode), .dep_i(dep), .warp_o(warp_o), .busy_o(busy), .ready_o(ready),
    .interlock_o(ilk), .sw_valid_o(v), .sw_last_o(last), .sw_lanes_o(lanes), .sw_row_o(row));

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic go(logic [K-1:0][N-1:0] m, sw_mode_e md);
    @(negedge clk); start = 1; mask = m; mode = md; warp_i = 2'($urandom);
    @(negedge clk); start = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K-1:0][N-1:0] m, seen;
    int exp_row [4][4] = '{'{0,0,2,1}, '{1,2,3,2}, '{6,5,4,4}, '{7,0,7,5}};
    logic [3:0] exp_lanes [4] = '{4'b1111, 4'b1111, 4'b1111, 4'b1101};
    start = 0; dep = '0; mask = '0; mode = SW_PACK; warp_i = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // 1) worked example; row r, column c is m[r][c] (column 0 = bit 0)
    m[0] = 4'b0011; m[1] = 4'b1001; m[2] = 4'b1110; m[3] = 4'b0100;
    m[4] = 4'b1100; m[5] = 4'b1010; m[6] = 4'b0001; m[7] = 4'b0101;
    go(m, SW_PACK);
    for (int s = 0; s < 4; s++) begin
      chk(v, $sformatf("example sub-warp %0d valid on cycle %0d", s, s + 1));
      chk(lanes == exp_lanes[s], $sformatf("example sub-warp %0d lanes %b", s, lanes));
      for (int c = 0; c < N; c++)
        if (exp_lanes[s][c]) chk(row[c] == 3'(exp_row[s][c]), $sformatf("example sub-warp %0d lane %0d row %0d", s, c, row[c]));
      chk(last == (s == 3), "last flag");
      chk(busy == (s != 3), "stall to fetch while threads remain");
      @(negedge clk);
    end
    chk(!v && ready && !busy, "idle after four sub-warps");
    // 2) random pack mode
    for (int t = 0; t < 200; t++) begin
      int maxcol, nsw;
      for (int r = 0; r < K; r++) m[r] = 4'($urandom);
      if (t == 0) m = '1;
      maxcol = 0;
      for (int c = 0; c < N; c++) begin
        int k; k = 0;
        for (int r = 0; r < K; r++) k += int'(m[r][c]);
        if (k > maxcol) maxcol = k;
      end
      go(m, SW_PACK);
      seen = '0; nsw = 0;
      while (1) begin
        if (v) begin
          nsw++;
          for (int c = 0; c < N; c++) if (lanes[c]) begin
            chk(m[row[c]][c] && !seen[row[c]][c], "issued thread is active and new");
            seen[row[c]][c] = 1'b1;
          end
        end
        if (!busy) break;
        @(negedge clk);
      end
      chk(seen == m, "every active thread issued");
      chk(nsw == ((m == '0) ? 1 : maxcol), $sformatf("sub-warps %0d vs fullest column %0d", nsw, maxcol));
      @(negedge clk);
    end
    // 3) row mode and single mode
    for (int r = 0; r < K; r++) m[r] = (r % 3 == 1) ? 4'b0000 : 4'($urandom) | 4'b1000;
    go(m, SW_ROW);
    for (int r = 0; r < K; r++) if (m[r] != 0) begin
      chk(v && lanes == m[r], $sformatf("row mode row %0d", r));
      for (int c = 0; c < N; c++) chk(row[c] == 3'(r), "row id in row mode");
      @(negedge clk);
    end
    chk(!busy, "row mode done");
    go('1, SW_SINGLE);
    chk(v && last && lanes == '0, "single sub-warp for a jump");
    @(negedge clk);
    chk(!v, "only one");
    // 4) interlock: row 0 lane 2 and all of row 1 blocked
    dep = '0; dep[0][2] = 1'b1; dep[1] = '1;
    m = '0; m[0] = 4'b0100; m[1] = 4'b1111;
    go(m, SW_PACK);
    chk(!v && ilk, "blocked threads are not issued");
    @(negedge clk); chk(!v && busy, "still waiting");
    dep[0][2] = 1'b0; #1;
    chk(v && lanes == 4'b0100 && row[2] == 0, "issued once the bit clears");
    @(negedge clk); dep = '0; #1;
    chk(v && last && lanes == 4'b1111, "row 1 follows");
    @(negedge clk);
    m = '0; m[0] = 4'b0001; dep = '0; dep[0][0] = 1'b1;
    go(m, SW_ROW);
    chk(!v && ilk, "row mode waits for the whole row");
    dep = '0; #1; chk(v && last, "row issued after clear");
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
