// gpu_pkg: sizes and types shared by the large-warp GPU core.
// Default sizes follow the evaluated configuration: 32 SIMD lanes, 1024 threads
// held as 4 large warps of 256 threads (8 rows of 32), a 64KB register file
// (16 32-bit registers per thread), 8 DRAM banks with 4KB rows and 128-byte lines.
// The instruction encoding (op_e, inst_t) is this design's own: the source
// evaluated its ideas on a simulated x86 with added intrinsics, so only the
// operations the mechanisms need are defined here.
package gpu_pkg;
  localparam int unsigned PC_W   = 16;   // instruction index width

  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,
    OP_ADD   = 4'd1,   // rd = rs1 + rs2
    OP_ADDI  = 4'd2,   // rd = rs1 + imm
    OP_TID   = 4'd3,   // rd = global thread id
    OP_SETLT = 4'd4,   // pred = (rs1 < rs2), unsigned
    OP_SETGT = 4'd5,   // pred = (rs1 > rs2), unsigned
    OP_BRA   = 4'd6,   // conditional branch on pred to target, reconverge at rpc
    OP_JMP   = 4'd7,   // unconditional jump to target
    OP_LD    = 4'd8,   // rd = global_mem[line of rs1][lane], hint bit may be set
    OP_CACC  = 4'd9,   // conditional accumulate: spm[rs1 + excl_prefix*4] = rs2 if pred; rd = count
    OP_TTRAV = 4'd10,  // tree traverse: rd = rs1 + (sum(pred) << rs2)
    OP_EXIT  = 4'd11,  // warp finishes
    OP_LI    = 4'd12   // rd = imm, zero-extended
  } op_e;

  typedef struct packed {
    op_e              op;
    logic [3:0]       rd;
    logic [3:0]       rs1;
    logic [3:0]       rs2;
    logic [15:0]      imm;
    logic [PC_W-1:0]  target;  // branch / jump target
    logic [PC_W-1:0]  rpc;     // reconvergence (control flow merge) PC of a branch
    logic             hint;    // row buffer locality hint for OP_LD
  } inst_t;

  // How the sub-warp former breaks a large warp into sub-warps.
  typedef enum logic [1:0] {
    SW_PACK   = 2'd0,   // one active thread per column, lowest row first
    SW_ROW    = 2'd1,   // one row of the active mask per sub-warp (memory instructions)
    SW_SINGLE = 2'd2    // a single sub-warp (unconditional jump / exit)
  } sw_mode_e;

  // instructions after which a warp is only re-fetched once all its sub-warps are done
  function automatic logic waits_all(op_e op);
    return op inside {OP_BRA, OP_JMP, OP_LD, OP_EXIT};
  endfunction

  function automatic sw_mode_e mode_of(op_e op);
    case (op)
      OP_LD, OP_CACC, OP_TTRAV: return SW_ROW;
      OP_JMP, OP_EXIT:          return SW_SINGLE;
      default:                  return SW_PACK;
    endcase
  endfunction
endpackage
