// scratchpad: software-managed on-chip memory with one bank per SIMD lane.
// Words are interleaved across the N banks (bank = word address mod N), so
// the contiguous run of up to N words written by a conditional accumulate
// always lands in N different banks and completes in one cycle. Each lane
// offers a write (byte address, word aligned); every bank accepts the
// lowest-numbered lane that addresses it and grant_o reports which lanes were
// served, so lanes that collided on a bank (a bank conflict) must try again.
// Each bank is its own array with one write port, fed through a crossbar from
// the lane that won it.
// One word-wide read port with one cycle latency serves the host side (for
// example to copy a filled output buffer out). Size 32KB as in the database
// evaluation; the interleaving and the conflict rule are this design's.
module scratchpad #(
  parameter int unsigned N      = 32,
  parameter int unsigned BYTES  = 32768,
  parameter int unsigned ADDR_W = 32
) (
  input  logic                        clk,
  input  logic [N-1:0]                we_i,
  input  logic [N-1:0][ADDR_W-1:0]    waddr_i,
  input  logic [N-1:0][31:0]          wdata_i,
  output logic [N-1:0]                grant_o,
  output logic                        conflict_o,
  input  logic                        re_i,
  input  logic [ADDR_W-1:0]           raddr_i,
  output logic [31:0]                 rdata_o
);
  localparam int unsigned NB    = $clog2(N);
  localparam int unsigned DEPTH = BYTES / 4 / N;
  localparam int unsigned DB    = $clog2(DEPTH);

  function automatic logic [NB-1:0] bank_of(logic [ADDR_W-1:0] a);
    return a[2 +: NB];
  endfunction
  function automatic logic [DB-1:0] row_of(logic [ADDR_W-1:0] a);
    return a[2 + NB +: DB];
  endfunction

  // arbitration: the lowest requesting lane wins each bank
  logic [N-1:0]          bwe;
  logic [N-1:0][NB-1:0]  blane;
  always_comb begin
    bwe = '0; blane = '0; grant_o = '0;
    for (int l = 0; l < N; l++) begin
      if (we_i[l] && !bwe[bank_of(waddr_i[l])]) begin
        grant_o[l]                 = 1'b1;
        bwe[bank_of(waddr_i[l])]   = 1'b1;
        blane[bank_of(waddr_i[l])] = NB'(l);
      end
    end
    conflict_o = (grant_o != we_i);
  end

  // one single-port-write array per bank
  logic [N-1:0][31:0] bank_rd;
  logic [NB-1:0]      rbank_q;
  for (genvar b = 0; b < N; b++) begin : g_bank
    logic [31:0] mem [DEPTH];
    logic [31:0] rd_q;
    always_ff @(posedge clk) begin
      if (bwe[b]) mem[row_of(waddr_i[blane[b]])] <= wdata_i[blane[b]];
      if (re_i && bank_of(raddr_i) == NB'(b)) rd_q <= mem[row_of(raddr_i)];
    end
    assign bank_rd[b] = rd_q;
  end
  always_ff @(posedge clk)
    if (re_i) rbank_q <= bank_of(raddr_i);
  assign rdata_o = bank_rd[rbank_q];
endmodule
