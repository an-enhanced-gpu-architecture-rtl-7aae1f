// tb_banked_rf: every lane reads and writes its own bank at its own row.
// Fills the file through both write ports, then reads random sub-warps whose
// lanes sit in different rows and compares with a reference array.
module tb_banked_rf;
  localparam int N = 8, K = 4, W = 2, R = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [0:0] rw, aw, bw;
  logic [N-1:0][1:0] rrow, arow;
  logic [1:0] r1, r2, ar, br, brow;
  logic [N-1:0][31:0] d1, d2, ad, bd;
  logic [N-1:0] ae, be;
  logic [31:0] ref_m [N][W][K][R];
  int checks = 0, failures = 0;

  banked_rf #(.N(N), .K(K), .W(W), .R(R)) dut (.clk,
    .rd_warp_i(rw), .rd_row_i(rrow), .rd_reg1_i(r1), .rd_reg2_i(r2), .rd_data1_o(d1), .rd_data2_o(d2),
    .wa_en_i(ae), .wa_warp_i(aw), .wa_row_i(arow), .wa_reg_i(ar), .wa_data_i(ad),
    .wb_en_i(be), .wb_warp_i(bw), .wb_row_i(brow), .wb_reg_i(br), .wb_data_i(bd));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ae = '0; be = '0; aw = 0; bw = 0; arow = '0; brow = 0; ar = 0; br = 0; ad = '0; bd = '0;
    rw = 0; rrow = '0; r1 = 0; r2 = 0;
    // fill through port B (whole rows)
    for (int w = 0; w < W; w++) for (int k = 0; k < K; k++) for (int g = 0; g < R; g++) begin
      @(negedge clk);
      be = '1; bw = 1'(w); brow = 2'(k); br = 2'(g);
      for (int c = 0; c < N; c++) begin bd[c] = $urandom; ref_m[c][w][k][g] = bd[c]; end
    end
    @(negedge clk); be = '0;
    for (int t = 0; t < 1500; t++) begin
      // random partial write through port A with per-lane rows
      @(negedge clk);
      ae = N'($urandom); aw = 1'($urandom); ar = 2'($urandom);
      for (int c = 0; c < N; c++) begin
        arow[c] = 2'($urandom); ad[c] = $urandom;
      end
      rw = 1'($urandom); r1 = 2'($urandom); r2 = 2'($urandom);
      for (int c = 0; c < N; c++) rrow[c] = 2'($urandom);
      #1;
      for (int c = 0; c < N; c++) begin
        checks += 2;
        if (d1[c] != ref_m[c][rw][rrow[c]][r1]) begin failures++; $display("FAIL rs1 lane %0d", c); end
        if (d2[c] != ref_m[c][rw][rrow[c]][r2]) begin failures++; $display("FAIL rs2 lane %0d", c); end
      end
      // the write lands at the next clock edge
      for (int c = 0; c < N; c++) if (ae[c]) ref_m[c][aw][arow[c]][ar] = ad[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
