// tb_cond_acc_unit: random warps through both instructions. For conditional
// accumulate every selected lane must get base + (number of selected lanes
// before it) << size, unselected lanes no write, and the count must match; for
// tree traverse the next address is base + popcount << log2(node size).
module tb_cond_acc_unit;
  localparam int N = 32;
  logic             tt;
  logic [N-1:0]     valid, pred;
  logic [31:0]      base, node;
  logic [1:0]       sz;
  logic [N-1:0][31:0] addr;
  logic [N-1:0]     we;
  logic [5:0]       cnt;
  logic [31:0]      nxt;
  int checks = 0, failures = 0;

  cond_acc_unit #(.N(N)) dut (.tt_i(tt), .valid_i(valid), .pred_i(pred), .base_i(base),
    .size_log2_i(sz), .node_size_i(node), .addr_o(addr), .we_o(we), .count_o(cnt), .next_o(nxt));

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      int k, sh;
      tt    = t[0];
      valid = (t % 5 == 0) ? '1 : $urandom;
      pred  = $urandom;
      base  = $urandom;
      sz    = 2'($urandom);
      sh    = $urandom_range(0, 12);
      node  = 32'(1) << sh;
      #1;
      k = 0;
      for (int i = 0; i < N; i++) begin
        if (valid[i] && pred[i]) begin
          chk(we[i] == !tt, $sformatf("we lane %0d", i));
          chk(addr[i] == base + (32'(k) << sz), $sformatf("addr lane %0d", i));
          k++;
        end else begin
          chk(we[i] == 1'b0, $sformatf("no write lane %0d", i));
        end
      end
      chk(cnt == 6'(k), $sformatf("count %0d vs %0d", cnt, k));
      chk(nxt == base + (32'(k) << sh), "tree traverse next node");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
