// tb_scratchpad: random lane writes, some colliding on a bank. Only the lowest
// lane per bank may be granted, conflicts must be flagged, granted words must
// read back (one-cycle read latency) and refused ones must leave memory as it was.
module tb_scratchpad;
  localparam int N = 8, BYTES = 1024;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [N-1:0] we, gnt;
  logic [N-1:0][31:0] wa, wd;
  logic conf, re;
  logic [31:0] ra, rd;
  logic [31:0] ref_m [BYTES/4];
  int checks = 0, failures = 0;

  scratchpad #(.N(N), .BYTES(BYTES)) dut (.clk, .we_i(we), .waddr_i(wa), .wdata_i(wd), .grant_o(gnt),
    .conflict_o(conf), .re_i(re), .raddr_i(ra), .rdata_o(rd));

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
    we = '0; wa = '0; wd = '0; re = 0; ra = 0;
    // initialise through contiguous full-width writes (never conflicting)
    for (int a = 0; a < BYTES / 4; a += N) begin
      @(negedge clk);
      we = '1;
      for (int l = 0; l < N; l++) begin wa[l] = 32'((a + l) * 4); wd[l] = $urandom; ref_m[a + l] = wd[l]; end
      #1 chk(gnt == '1 && !conf, "contiguous writes never conflict");
    end
    for (int t = 0; t < 1000; t++) begin
      logic [N-1:0] used, eg;
      @(negedge clk);
      we = N'($urandom);
      for (int l = 0; l < N; l++) begin wa[l] = 32'($urandom_range(0, BYTES/4 - 1) * 4); wd[l] = $urandom; end
      #1;
      used = '0; eg = '0;
      for (int l = 0; l < N; l++)
        if (we[l] && !used[wa[l][4:2]]) begin eg[l] = 1; used[wa[l][4:2]] = 1; end
      chk(gnt == eg, "grant = lowest lane per bank");
      chk(conf == (eg != we), "conflict flag");
      for (int l = 0; l < N; l++) if (eg[l]) ref_m[wa[l] >> 2] = wd[l];
      @(negedge clk); we = '0;
      for (int k = 0; k < 4; k++) begin
        ra = 32'($urandom_range(0, BYTES/4 - 1) * 4); re = 1;
        if (k == 0) for (int l = 0; l < N; l++) if (eg[l]) ra = wa[l];
        @(negedge clk); re = 0;
        chk(rd == ref_m[ra >> 2], $sformatf("read %0h", ra));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
