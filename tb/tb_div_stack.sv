// tb_div_stack: the branch example of the source (a divergent branch pushes a
// join and a divergent entry, both paths pop back to the full mask), then
// random push / pop sequences against a reference stack.
module tb_div_stack;
  localparam int M = 16, P = 8, D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push1, push2, pop, empty, full;
  logic [P-1:0] arpc, aepc, brpc, bepc, trpc, tepc;
  logic [M-1:0] amask, bmask, tmask;
  logic [P-1:0] rr [$], re [$];
  logic [M-1:0] rm [$];
  int checks = 0, failures = 0;

  div_stack #(.MASK_W(M), .PC_W(P), .DEPTH(D)) dut (.clk, .rst_n, .push1_i(push1), .push2_i(push2),
    .pop_i(pop), .a_rpc_i(arpc), .a_mask_i(amask), .a_epc_i(aepc), .b_rpc_i(brpc), .b_mask_i(bmask),
    .b_epc_i(bepc), .empty_o(empty), .full_o(full), .top_rpc_o(trpc), .top_mask_o(tmask), .top_epc_o(tepc));

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
    push1 = 0; push2 = 0; pop = 0; arpc = 0; aepc = 0; brpc = 0; bepc = 0; amask = 0; bmask = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    chk(empty, "empty after reset");
    // branch at A (mask 1111) splits into B (1110, taken, run first) and C (0001); merge at D
    push2 = 1; arpc = 8'hD; aepc = 8'hD; amask = 16'h000F; brpc = 8'hD; bepc = 8'hC; bmask = 16'h0001;
    @(negedge clk); push2 = 0;
    chk(!empty && trpc == 8'hD && tepc == 8'hC && tmask == 16'h0001, "divergent entry on top");
    pop = 1; @(negedge clk); pop = 0;
    chk(trpc == 8'hD && tepc == 8'hD && tmask == 16'h000F, "join entry after first pop");
    pop = 1; @(negedge clk); pop = 0;
    chk(empty, "empty after reconvergence");
    // random traffic
    for (int t = 0; t < 3000; t++) begin
      int op;
      op = $urandom_range(0, 2);
      push1 = 0; push2 = 0; pop = 0;
      arpc = 8'($urandom); aepc = 8'($urandom); amask = 16'($urandom);
      brpc = 8'($urandom); bepc = 8'($urandom); bmask = 16'($urandom);
      if (op == 0 && !full) begin
        push2 = 1; rr.push_back(arpc); re.push_back(aepc); rm.push_back(amask);
        rr.push_back(brpc); re.push_back(bepc); rm.push_back(bmask);
      end else if (op == 1 && rr.size() < D) begin
        push1 = 1; rr.push_back(arpc); re.push_back(aepc); rm.push_back(amask);
      end else if (rr.size() > 0) begin
        pop = 1; void'(rr.pop_back()); void'(re.pop_back()); void'(rm.pop_back());
      end
      @(negedge clk);
      push1 = 0; push2 = 0; pop = 0;
      chk(empty == (rr.size() == 0), "empty flag");
      chk(full == (rr.size() >= D - 1), "full flag");
      if (rr.size() > 0)
        chk(trpc == rr[$] && tepc == re[$] && tmask == rm[$], $sformatf("top entry at step %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
