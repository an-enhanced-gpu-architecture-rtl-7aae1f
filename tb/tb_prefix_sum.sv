// tb_prefix_sum: checks the predicate scan against a running-sum reference,
// first on the 8-lane example used to explain the adder network
// (1 0 0 1 1 0 1 0 gives 1 1 1 2 3 3 4 4), then on random 32-lane vectors.
module tb_prefix_sum;
  logic [7:0]           p8;
  logic [7:0][3:0]      s8;
  logic [31:0]          p32;
  logic [31:0][5:0]     s32;
  int checks = 0, failures = 0;

  prefix_sum #(.N(8))  u8  (.pred_i(p8),  .sum_o(s8));
  prefix_sum #(.N(32)) u32 (.pred_i(p32), .sum_o(s32));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp8 [8] = '{1, 1, 1, 2, 3, 3, 4, 4};
    p8 = 8'b0101_1001;   // lane 0 is bit 0: lanes 0,3,4,6 set
    #1;
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (s8[i] != 4'(exp8[i])) begin failures++; $display("FAIL lane %0d: %0d", i, s8[i]); end
    end
    for (int t = 0; t < 500; t++) begin
      int run;
      p32 = $urandom;
      if (t == 0) p32 = '1;
      if (t == 1) p32 = '0;
      #1;
      run = 0;
      for (int i = 0; i < 32; i++) begin
        run += int'(p32[i]);
        checks++;
        if (s32[i] != 6'(run)) begin failures++; $display("FAIL t%0d lane %0d: %0d vs %0d", t, i, s32[i], run); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
