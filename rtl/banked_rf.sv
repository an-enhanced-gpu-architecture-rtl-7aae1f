// banked_rf: register file with one separately addressed bank per SIMD lane.
// Bank c holds the registers of every thread in column c of every large warp,
// at word {large warp ID, row ID, register ID}. Because each bank has its own
// address decoder, one sub-warp can read threads taken from different rows of
// the large warp in parallel, one per lane. The banking and indexing follow the
// source; the port count is this design's: two read ports (rs1, rs2) read
// asynchronously, and two write ports (A: pipeline writeback, B: returning
// load data, which writes a whole row). Writes happen at the clock edge; if both
// ports hit the same word, port B wins (the core's interlock prevents it).
// Contents are not reset: software writes a register before reading it.
module banked_rf #(
  parameter int unsigned N      = 32,
  parameter int unsigned K      = 8,
  parameter int unsigned W      = 4,
  parameter int unsigned R      = 16,
  parameter int unsigned DATA_W = 32
) (
  input  logic                              clk,
  input  logic [$clog2(W)-1:0]              rd_warp_i,
  input  logic [N-1:0][$clog2(K)-1:0]       rd_row_i,
  input  logic [$clog2(R)-1:0]              rd_reg1_i,
  input  logic [$clog2(R)-1:0]              rd_reg2_i,
  output logic [N-1:0][DATA_W-1:0]          rd_data1_o,
  output logic [N-1:0][DATA_W-1:0]          rd_data2_o,
  input  logic [N-1:0]                      wa_en_i,
  input  logic [$clog2(W)-1:0]              wa_warp_i,
  input  logic [N-1:0][$clog2(K)-1:0]       wa_row_i,
  input  logic [$clog2(R)-1:0]              wa_reg_i,
  input  logic [N-1:0][DATA_W-1:0]          wa_data_i,
  input  logic [N-1:0]                      wb_en_i,
  input  logic [$clog2(W)-1:0]              wb_warp_i,
  input  logic [$clog2(K)-1:0]              wb_row_i,
  input  logic [$clog2(R)-1:0]              wb_reg_i,
  input  logic [N-1:0][DATA_W-1:0]          wb_data_i
);
  localparam int unsigned WB_ = $clog2(W), KB = $clog2(K), RB = $clog2(R);
  localparam int unsigned AW = WB_ + KB + RB;
  localparam int unsigned DEPTH = W * K * R;

  function automatic logic [AW-1:0] idx(logic [WB_-1:0] w, logic [KB-1:0] r, logic [RB-1:0] g);
    return {w, r, g};
  endfunction

  // one bank per lane, each with its own address decoders
  for (genvar c = 0; c < N; c++) begin : g_lane
    logic [DATA_W-1:0] bank [DEPTH];
    assign rd_data1_o[c] = bank[idx(rd_warp_i, rd_row_i[c], rd_reg1_i)];
    assign rd_data2_o[c] = bank[idx(rd_warp_i, rd_row_i[c], rd_reg2_i)];
    always_ff @(posedge clk) begin
      if (wa_en_i[c]) bank[idx(wa_warp_i, wa_row_i[c], wa_reg_i)] <= wa_data_i[c];
      if (wb_en_i[c]) bank[idx(wb_warp_i, wb_row_i, wb_reg_i)]    <= wb_data_i[c];
    end
  end
endmodule
