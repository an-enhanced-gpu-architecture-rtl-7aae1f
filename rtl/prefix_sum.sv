// prefix_sum: inclusive prefix sum (scan) of one predicate bit per SIMD lane.
// It is the adder network behind conditional accumulate: level d adds to each
// lane's running sum the running sum 2**d lanes to its left (lanes below 2**d
// pass through), so N lanes need log2(N) levels of adders whose width grows by
// one bit per level. This trades extra adders for the shortest adder depth, as
// the source prefers over a work-efficient scan. Purely combinational.
//   pred_i : predicate bit per lane, lane 0 first
//   sum_o  : sum_o[i] = pred_i[0] + ... + pred_i[i]
module prefix_sum #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]                pred_i,
  output logic [N-1:0][$clog2(N):0]   sum_o
);
  localparam int unsigned L  = $clog2(N);
  localparam int unsigned SW = L + 1;

  // lvl[d] holds the partial sums after d levels of adders
  logic [L:0][N-1:0][SW-1:0] lvl;

  for (genvar i = 0; i < N; i++) begin : g_in
    assign lvl[0][i] = SW'(pred_i[i]);
    assign sum_o[i]  = lvl[L][i];
  end
  for (genvar d = 0; d < L; d++) begin : g_lvl
    for (genvar i = 0; i < N; i++) begin : g_add
      if (i >= (1 << d)) begin : g_sum
        assign lvl[d+1][i] = lvl[d][i] + lvl[d][i-(1<<d)];
      end else begin : g_pass
        assign lvl[d+1][i] = lvl[d][i];
      end
    end
  end
endmodule
