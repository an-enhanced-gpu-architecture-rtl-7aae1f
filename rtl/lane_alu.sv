// lane_alu: the functional unit of one SIMD lane. The source names the lanes
// but defines no instruction set of its own, so the operations here are only
// those the core needs to exercise its mechanisms: add, add immediate, load immediate,
// thread id, and the two compares that set a thread's predicate bit. Combinational.
module lane_alu
  import gpu_pkg::*;
#(
  parameter int unsigned DW = 32
) (
  input  op_e             op_i,
  input  logic [DW-1:0]   a_i,
  input  logic [DW-1:0]   b_i,
  input  logic [15:0]     imm_i,
  input  logic [DW-1:0]   tid_i,
  output logic [DW-1:0]   result_o,
  output logic            wr_o,       // result_o goes to the destination register
  output logic            pred_o,
  output logic            pred_wr_o   // pred_o goes to the thread's predicate bit
);
  always_comb begin
    result_o  = '0;
    wr_o      = 1'b0;
    pred_o    = 1'b0;
    pred_wr_o = 1'b0;
    case (op_i)
      OP_ADD:   begin result_o = a_i + b_i;                 wr_o = 1'b1; end
      OP_ADDI:  begin result_o = a_i + DW'(signed'(imm_i)); wr_o = 1'b1; end
      OP_LI:    begin result_o = DW'(imm_i);                wr_o = 1'b1; end
      OP_TID:   begin result_o = tid_i;                     wr_o = 1'b1; end
      OP_SETLT: begin pred_o = (a_i < b_i);                 pred_wr_o = 1'b1; end
      OP_SETGT: begin pred_o = (a_i > b_i);                 pred_wr_o = 1'b1; end
      default: ;
    endcase
  end
endmodule
