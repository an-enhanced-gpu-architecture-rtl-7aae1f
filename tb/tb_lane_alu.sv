// tb_lane_alu: random operands through every lane operation against a reference.
module tb_lane_alu;
  import gpu_pkg::*;
  op_e op;
  logic [31:0] a, b, tid, res;
  logic [15:0] imm;
  logic wr, p, pwr;
  int checks = 0, failures = 0;

  lane_alu dut (.op_i(op), .a_i(a), .b_i(b), .imm_i(imm), .tid_i(tid), .result_o(res),
                .wr_o(wr), .pred_o(p), .pred_wr_o(pwr));

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
    for (int t = 0; t < 300; t++) begin
      a = $urandom; b = (t % 7 == 0) ? a : $urandom; imm = 16'($urandom); tid = $urandom;
      op = OP_ADD;   #1; chk(wr && !pwr && res == a + b, "add");
      op = OP_ADDI;  #1; chk(wr && res == a + {{16{imm[15]}}, imm}, "addi");
      op = OP_LI;    #1; chk(wr && res == {16'd0, imm}, "li");
      op = OP_TID;   #1; chk(wr && res == tid, "tid");
      op = OP_SETLT; #1; chk(!wr && pwr && p == (a < b), "setlt");
      op = OP_SETGT; #1; chk(!wr && pwr && p == (a > b), "setgt");
      op = OP_BRA;   #1; chk(!wr && !pwr, "branch writes nothing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
