// gw_pkg: shared constants and types of the Graph-Waving (GW) streaming
// multiprocessor core.
//
// The GW core runs narrow 8-wide warps. Four schedulers each own one 16-lane
// SIMD unit and try to issue an even/odd warp pair that sits at the same PC,
// a single warp when the pair has split, or a "scalar-wave": up to 16 scalar
// instructions (one per warp of the scheduler) with the same PC executed
// side by side on the 16 lanes. Decoded instructions live in a shared,
// set-associative Instruction Storage and are reused across warps.
//
// The warp width (8), the SIMD unit width (16), the four schedulers and the
// 16 warps a scalar-wave / scalar register entry can cover follow the
// architecture description. The instruction set below is this design's own:
// the architecture only fixes that every instruction carries a scalar flag,
// and that the intrinsics get_warp_id, get_warp_local_id and get_simd_width
// exist. Register operands carry a tag bit that selects the scalar register
// file instead of the per-lane vector register file.
//
// Instruction word (32 bits):
//   [31]    S      scalar flag (set by compiler for warp-uniform work)
//   [30:27] op     opcode_e
//   [26:22] dst    {tag, index}   tag=1: scalar register
//   [21:17] src1   {tag, index}
//   [16:12] src2   {tag, index}
//   [11:0]  imm    sign-extended immediate / branch target
package gw_pkg;

  localparam int unsigned NUM_SCHED       = 4;   // schedulers / SIMD units per core
  localparam int unsigned WARP_WIDTH      = 8;   // threads per warp
  localparam int unsigned SIMD_WIDTH      = 16;  // lanes per SIMD unit (one warp pair)
  localparam int unsigned WARPS_PER_SCHED = 16;  // warps (8 even + 8 odd) per scheduler
  localparam int unsigned NUM_WARPS       = NUM_SCHED * WARPS_PER_SCHED;
  localparam int unsigned DATA_W          = 32;
  localparam int unsigned PC_W            = 10;  // instruction-word address
  localparam int unsigned REG_IDX_W       = 4;   // 16 vector and 16 scalar registers
  localparam int unsigned NUM_REGS        = 1 << REG_IDX_W;
  localparam int unsigned GWID_W          = $clog2(NUM_WARPS);

  typedef logic [PC_W-1:0]   pc_t;
  typedef logic [DATA_W-1:0] word_t;

  typedef enum logic [3:0] {
    OP_NOP   = 4'd0,
    OP_ADD   = 4'd1,
    OP_SUB   = 4'd2,
    OP_MUL   = 4'd3,
    OP_AND   = 4'd4,
    OP_OR    = 4'd5,
    OP_XOR   = 4'd6,
    OP_SLT   = 4'd7,   // signed set-less-than
    OP_ADDI  = 4'd8,
    OP_MOVI  = 4'd9,
    OP_WID   = 4'd10,  // get_warp_id()
    OP_LID   = 4'd11,  // get_warp_local_id()
    OP_SIMDW = 4'd12,  // get_simd_width()
    OP_BNZ   = 4'd13,  // branch to imm if src1 != 0 (warp-uniform condition)
    OP_BZ    = 4'd14,  // branch to imm if src1 == 0
    OP_EXIT  = 4'd15
  } opcode_e;

  typedef struct packed {
    logic                 scalar;  // 1: scalar register file
    logic [REG_IDX_W-1:0] idx;
  } reg_t;

  // Decoded instruction as held in Instruction Storage. The scalar flag is
  // held next to it in the storage tag array.
  typedef struct packed {
    opcode_e     op;
    reg_t        dst;
    reg_t        src1;
    reg_t        src2;
    logic [11:0] imm;
    logic        wr;      // writes dst
    logic        rd1;     // reads src1
    logic        rd2;     // reads src2
    logic        branch;
    logic        ex;      // exit
  } dinst_t;

  // Kind of an issue slot of a scheduler.
  typedef enum logic [1:0] {
    ISS_NONE   = 2'd0,
    ISS_PAIR   = 2'd1,   // even and odd warp together, 16 lanes
    ISS_SINGLE = 2'd2,   // one warp of a pair, 8 lanes
    ISS_WAVE   = 2'd3    // scalar-wave, one lane per warp
  } iss_kind_e;

  // Global warp id <-> (scheduler, local slot). Pairs are dealt to the
  // schedulers in turn: pair p = gwid/2 goes to scheduler p % NUM_SCHED.
  // Even global ids are even slots (lanes 0-7), odd ids odd slots (8-15).
  function automatic logic [GWID_W-1:0] gwid_of(input int unsigned sched,
                                                input int unsigned slot);
    int unsigned p;
    p = (slot / 2) * NUM_SCHED + sched;
    return GWID_W'(2 * p + (slot % 2));
  endfunction

endpackage
