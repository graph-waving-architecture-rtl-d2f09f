// gw_sm: one Graph-Waving multi-threaded SIMD processor core (top).
//
// A shared front end (fetch unit with decode, Instruction Storage) feeds four
// scheduler clusters, each with its own Warp Status Table slice, scoreboard,
// Scalar-Wave Formation Unit, pair scheduler, register file and 16-lane SIMD
// unit. 64 warps of 8 threads: pair p (global warps 2p, 2p+1) belongs to
// scheduler p % 4. Up to four instructions issue per cycle, one per
// scheduler, each a warp pair, a single warp or a scalar-wave.
//
// Interface:
//   start/nwarps     launch warps 0..nwarps-1 at PC 0 (one-cycle pulse)
//   ic_req_*/ic_rsp_* instruction cache, which is outside this core: a request
//                    names an aligned pair of instruction words and a buffer
//                    tag; the response returns both words with the tag, with
//                    any latency and in any order.
//   dbg_*            read any register of any warp (8 lanes)
//   idle             no warp running and nothing in flight
//   ev_*             one-cycle event flags per scheduler / front end
// Memory instructions, special functions and in-warp divergence are not
// part of this core: those units are outside its scope.
module gw_sm
  import gw_pkg::*;
#(
  parameter int unsigned IS_SETS = 16,
  parameter int unsigned IS_WAYS = 3,
  parameter int unsigned NBUF    = 2,    // fetch buffers
  parameter int unsigned NSW     = 4,    // SWST entries per scheduler
  parameter int unsigned LAT     = 2,    // SIMD unit latency
  localparam int unsigned BW     = (NBUF > 1) ? $clog2(NBUF) : 1,
  localparam int unsigned PTR_W  = $clog2(IS_SETS * IS_WAYS),
  localparam int unsigned CNT_W  = $clog2(NUM_WARPS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [GWID_W:0]      nwarps,
  // instruction cache
  output logic                 ic_req_valid,
  output pc_t                  ic_req_pc,
  output logic [BW-1:0]        ic_req_tag,
  input  logic                 ic_req_ready,
  input  logic                 ic_rsp_valid,
  input  logic [BW-1:0]        ic_rsp_tag,
  input  logic [31:0]          ic_rsp_data [2],
  // debug
  input  logic [GWID_W-1:0]    dbg_gwid,
  input  reg_t                 dbg_reg,
  output word_t                dbg_data [WARP_WIDTH],
  // status and events
  output logic                 idle,
  output logic [NUM_SCHED-1:0] ev_pair,
  output logic [NUM_SCHED-1:0] ev_single,
  output logic [NUM_SCHED-1:0] ev_wave,
  output logic [4:0]           ev_wave_size [NUM_SCHED],
  output logic [NUM_SCHED-1:0] ev_hazard,
  output logic [NUM_SCHED-1:0] ev_sw_full,
  output logic [NUM_SCHED-1:0] ev_lk_hit,
  output logic [NUM_SCHED-1:0] ev_lk_miss,
  output logic                 ev_fetch,      // new instruction cache request
  output logic                 ev_fetch_join, // warp joined a fetch in flight
  output logic                 ev_ins_stall   // insert held: set fully referenced
);

  localparam int unsigned NWS = WARPS_PER_SCHED;
  localparam int unsigned SW_ = $clog2(NWS);

  // ---------------- instruction storage ----------------
  logic [NUM_SCHED-1:0] lk_valid, lk_hit;
  pc_t                  lk_pc    [NUM_SCHED];
  logic [CNT_W-1:0]     lk_count [NUM_SCHED];
  logic [PTR_W-1:0]     lk_ptr   [NUM_SCHED];
  logic [NUM_WARPS-1:0] rel_valid;
  logic [PTR_W-1:0]     rel_ptr  [NUM_WARPS];
  logic [PTR_W-1:0]     rd_ptr   [NUM_WARPS];
  logic                 rd_slot  [NUM_WARPS];
  dinst_t               rd_inst  [NUM_WARPS];
  logic                 rd_scalar[NUM_WARPS];
  logic                 ins_valid, ins_ready;
  pc_t                  ins_pc;
  dinst_t               ins_inst [2];
  logic [1:0]           ins_scalar;
  logic [CNT_W-1:0]     refcnt   [IS_SETS*IS_WAYS];

  gw_inst_storage #(.SETS(IS_SETS), .WAYS(IS_WAYS), .NLK(NUM_SCHED), .NRD(NUM_WARPS)) u_is (
    .clk, .rst_n,
    .lk_valid, .lk_pc, .lk_count, .lk_hit, .lk_ptr,
    .rel_valid, .rel_ptr,
    .ins_valid, .ins_pc, .ins_inst, .ins_scalar, .ins_ready,
    .rd_ptr, .rd_slot, .rd_inst, .rd_scalar,
    .refcnt_o(refcnt)
  );

  // ---------------- fetch unit ----------------
  logic [NUM_WARPS-1:0] rtf;
  pc_t                  warp_pc [NUM_WARPS];
  logic                 fq_valid, fq_new, fill_valid;
  pc_t                  fq_pc, fill_pc;

  gw_fetch_unit #(.NW(NUM_WARPS), .NBUF(NBUF)) u_fetch (
    .clk, .rst_n, .rtf, .warp_pc,
    .fq_valid, .fq_pc, .fq_new,
    .ic_req_valid, .ic_req_pc, .ic_req_tag, .ic_req_ready,
    .ic_rsp_valid, .ic_rsp_tag, .ic_rsp_data,
    .ins_valid, .ins_pc, .ins_inst, .ins_scalar, .ins_ready,
    .fill_valid, .fill_pc
  );

  assign ev_fetch      = fq_new;
  assign ev_fetch_join = fq_valid && !fq_new;
  assign ev_ins_stall  = ins_valid && !ins_ready;

  // ---------------- scheduler clusters ----------------
  logic [NUM_SCHED-1:0] c_idle;
  word_t                c_dbg [NUM_SCHED][WARP_WIDTH];
  logic [SW_-1:0]       dbg_slot;
  logic [1:0]           dbg_c;

  // global warp id -> (scheduler, slot), the inverse of gwid_of
  always_comb begin
    int unsigned p;
    p        = int'(dbg_gwid) / 2;
    dbg_c    = 2'(p % NUM_SCHED);
    dbg_slot = SW_'(2 * (p / NUM_SCHED) + int'(dbg_gwid) % 2);
  end

  for (genvar c = 0; c < NUM_SCHED; c++) begin : g_cl
    logic [NWS-1:0]   start_mask;
    logic [NWS-1:0]   c_rel_valid, c_rtf;
    logic [PTR_W-1:0] c_rel_ptr [NWS], c_rd_ptr [NWS];
    logic             c_rd_slot [NWS];
    dinst_t           c_rd_inst [NWS];
    logic             c_rd_scalar [NWS];
    pc_t              c_pc [NWS];

    always_comb
      for (int s = 0; s < NWS; s++) begin
        start_mask[s]           = {1'b0, gwid_of(c, s)} < nwarps;
        rel_valid[c*NWS+s]      = c_rel_valid[s];
        rel_ptr[c*NWS+s]        = c_rel_ptr[s];
        rd_ptr[c*NWS+s]         = c_rd_ptr[s];
        rd_slot[c*NWS+s]        = c_rd_slot[s];
        c_rd_inst[s]            = rd_inst[c*NWS+s];
        c_rd_scalar[s]          = rd_scalar[c*NWS+s];
        rtf[c*NWS+s]            = c_rtf[s];
        warp_pc[c*NWS+s]        = c_pc[s];
      end

    gw_cluster #(.CID(c), .NSW(NSW), .LAT(LAT), .PTR_W(PTR_W), .CNT_W(CNT_W)) u_cl (
      .clk, .rst_n, .start, .start_mask,
      .fq_valid, .fq_pc, .fill_valid, .fill_pc,
      .lk_valid(lk_valid[c]), .lk_pc(lk_pc[c]), .lk_count(lk_count[c]),
      .lk_hit(lk_hit[c]), .lk_ptr(lk_ptr[c]),
      .rel_valid(c_rel_valid), .rel_ptr(c_rel_ptr),
      .rd_ptr(c_rd_ptr), .rd_slot(c_rd_slot), .rd_inst(c_rd_inst), .rd_scalar(c_rd_scalar),
      .rtf(c_rtf), .warp_pc(c_pc),
      .dbg_slot, .dbg_reg, .dbg_data(c_dbg[c]),
      .idle(c_idle[c]),
      .ev_pair(ev_pair[c]), .ev_single(ev_single[c]), .ev_wave(ev_wave[c]),
      .ev_wave_size(ev_wave_size[c]), .ev_hazard(ev_hazard[c]), .ev_sw_full(ev_sw_full[c])
    );

    assign ev_lk_hit[c]  = lk_valid[c] && lk_hit[c];
    assign ev_lk_miss[c] = lk_valid[c] && !lk_hit[c];
  end

  assign dbg_data = c_dbg[dbg_c];
  assign idle     = &c_idle && !(|rtf);

endmodule
