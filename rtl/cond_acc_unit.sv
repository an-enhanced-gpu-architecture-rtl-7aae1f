// cond_acc_unit: execution hardware for the conditional accumulate (COND_ACC)
// and tree traverse (TREE_TRAVERSE) instructions of one SIMD-width warp.
// Both reuse one prefix_sum adder network over the lanes' predicate bits.
//   COND_ACC  (tt_i = 0): every valid lane whose predicate is set gets a unique
//     output address base + (exclusive prefix << size_log2_i) and a write
//     enable, so the selected source values land contiguously from base with no
//     gaps; count_o is the number written (it goes to the destination register).
//     The exclusive prefix is the inclusive sum minus the lane's own bit.
//   TREE_TRAVERSE (tt_i = 1): next_o = base + (number of set predicates <<
//     log2(node_size_i)); node_size_i must be a power of two (only its highest
//     set bit is used). No lane writes.
// Lanes with valid_i = 0 contribute nothing. Purely combinational; in the core
// it sits in the execute stage. Element sizes of 1, 2, 4 and 8 bytes
// (size_log2_i = 0..3) follow the source; addresses are byte addresses.
module cond_acc_unit #(
  parameter int unsigned N      = 32,
  parameter int unsigned ADDR_W = 32
) (
  input  logic                        tt_i,
  input  logic [N-1:0]                valid_i,
  input  logic [N-1:0]                pred_i,
  input  logic [ADDR_W-1:0]           base_i,
  input  logic [1:0]                  size_log2_i,
  input  logic [ADDR_W-1:0]           node_size_i,
  output logic [N-1:0][ADDR_W-1:0]    addr_o,
  output logic [N-1:0]                we_o,
  output logic [$clog2(N):0]          count_o,
  output logic [ADDR_W-1:0]           next_o
);
  localparam int unsigned SW = $clog2(N) + 1;

  logic [N-1:0]          p;
  logic [N-1:0][SW-1:0]  incl;
  logic [$clog2(ADDR_W)-1:0] node_shift;

  assign p = pred_i & valid_i;

  prefix_sum #(.N(N)) u_scan (.pred_i(p), .sum_o(incl));

  always_comb begin
    node_shift = '0;
    for (int b = 0; b < ADDR_W; b++)
      if (node_size_i[b]) node_shift = $clog2(ADDR_W)'(b);
  end

  always_comb begin
    count_o = incl[N-1];
    next_o  = base_i + (ADDR_W'(incl[N-1]) << node_shift);
    for (int i = 0; i < N; i++) begin
      addr_o[i] = base_i + (ADDR_W'(incl[i] - SW'(p[i])) << size_log2_i);
      we_o[i]   = p[i] & ~tt_i;
    end
  end
endmodule
