// gw_cluster: one scheduler of the GW core with everything it owns.
//
// Holds the Warp Status Table slice of its 16 warps, the Scoreboarding unit,
// the Scalar-Wave Formation Unit, the pair scheduler, the register file and
// the 16-lane SIMD unit. Per cycle: each warp's next instruction is read from
// Instruction Storage through the warp's pointer and checked against the
// scoreboard. A hazard-free non-scalar instruction makes the warp ready; a
// hazard-free scalar one makes it a scalar-wave candidate. The scheduler
// picks a pair, a single warp or a wave; operands are read and the branch
// outcome and next PC of every issued warp are worked out in the same cycle,
// and the warps' storage entries are released. Results write back LAT cycles
// later and free their scoreboard (and scalar-wave) entries.
//
// Branches are taken or not per warp (per lane of a wave) on the warp's
// first-lane operand; divergence inside a warp is not handled (no active
// mask stack). Event outputs count the mechanisms for observation.
module gw_cluster
  import gw_pkg::*;
#(
  parameter int unsigned CID   = 0,       // scheduler number
  parameter int unsigned NSW   = 4,       // scalar-wave IDs / SWST entries
  parameter int unsigned LAT   = 2,       // SIMD unit latency
  parameter int unsigned PTR_W = 6,
  parameter int unsigned CNT_W = 7,
  localparam int unsigned NWS  = WARPS_PER_SCHED,
  localparam int unsigned PW   = $clog2(NWS / 2),
  localparam int unsigned SWW  = $clog2(NSW),
  localparam int unsigned SW_  = $clog2(NWS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NWS-1:0]   start_mask,
  // fetch broadcasts
  input  logic             fq_valid,
  input  pc_t              fq_pc,
  input  logic             fill_valid,
  input  pc_t              fill_pc,
  // instruction storage
  output logic             lk_valid,
  output pc_t              lk_pc,
  output logic [CNT_W-1:0] lk_count,
  input  logic             lk_hit,
  input  logic [PTR_W-1:0] lk_ptr,
  output logic [NWS-1:0]   rel_valid,
  output logic [PTR_W-1:0] rel_ptr [NWS],
  output logic [PTR_W-1:0] rd_ptr  [NWS],
  output logic             rd_slot [NWS],
  input  dinst_t           rd_inst [NWS],
  input  logic             rd_scalar [NWS],
  // fetch arbitration inputs
  output logic [NWS-1:0]   rtf,
  output pc_t              warp_pc [NWS],
  // debug and status
  input  logic [SW_-1:0]   dbg_slot,
  input  reg_t             dbg_reg,
  output word_t            dbg_data [WARP_WIDTH],
  output logic             idle,
  output logic             ev_pair,
  output logic             ev_single,
  output logic             ev_wave,
  output logic [4:0]       ev_wave_size,
  output logic             ev_hazard,      // a valid instruction was held by the scoreboard
  output logic             ev_sw_full      // a scalar candidate found no SWST room
);

  localparam int unsigned L = 2 * WARP_WIDTH;

  // ---------------- warp status table ----------------
  logic [NWS-1:0]   iss, iss_exit, join_v, vinst, sw_valid, done, active, icmiss;
  pc_t              iss_npc [NWS];
  logic [SWW-1:0]   join_swid [NWS], swid [NWS];
  pc_t              pc [NWS];
  logic [PTR_W-1:0] ptr [NWS];

  gw_wst #(.NWS(NWS), .NSW(NSW), .PTR_W(PTR_W), .CNT_W(CNT_W)) u_wst (
    .clk, .rst_n, .start, .start_mask,
    .iss, .iss_npc, .iss_exit, .join_v, .join_swid,
    .fq_valid, .fq_pc, .fill_valid, .fill_pc,
    .lk_valid, .lk_pc, .lk_count, .lk_hit, .lk_ptr,
    .rel_valid, .rel_ptr,
    .pc, .ptr, .vinst, .rtf, .icmiss, .sw_valid, .swid, .done, .active
  );

  always_comb
    for (int w = 0; w < NWS; w++) begin
      rd_ptr[w]  = ptr[w];
      rd_slot[w] = pc[w][0];
      warp_pc[w] = pc[w];
    end

  // ---------------- scoreboard ----------------
  logic [NWS-1:0] hz, ready, cand;
  logic [NWS-1:0] rsv_mask, wsv_mask, sb_rel_mask;
  logic           wsv, wrel;
  logic [SWW-1:0] wsv_swid, wrel_swid;
  reg_t           rsv_dst, wsv_dst, sb_rel_dst;

  gw_scoreboard #(.NWS(NWS), .NSW(NSW)) u_sb (
    .clk, .rst_n, .chk_inst(rd_inst), .hz,
    .rsv_mask, .rsv_dst, .wsv, .wsv_swid, .wsv_mask, .wsv_dst,
    .rel_mask(sb_rel_mask), .rel_dst(sb_rel_dst), .wrel, .wrel_swid
  );

  always_comb
    for (int w = 0; w < NWS; w++) begin
      ready[w] = vinst[w] && !sw_valid[w] && !rd_scalar[w] && !hz[w];
      cand[w]  = vinst[w] && !sw_valid[w] &&  rd_scalar[w] && !hz[w];
    end

  // ---------------- scalar-wave formation ----------------
  logic           sw_avail, sw_issue, sw_rel;
  logic [SWW-1:0] sw_swid, sw_rel_swid;
  logic [NWS-1:0] sw_mask;
  pc_t            sw_pc;
  logic [NSW-1:0] sw_busy;

  gw_swfu #(.NWS(NWS), .NSW(NSW)) u_swfu (
    .clk, .rst_n, .start, .cand, .cand_pc(pc), .join_v, .join_swid,
    .sw_avail, .sw_swid, .sw_mask, .sw_pc, .sw_issue,
    .rel(sw_rel), .rel_swid(sw_rel_swid), .busy(sw_busy)
  );

  // ---------------- scheduler ----------------
  iss_kind_e     kind;
  logic [PW-1:0] pair;
  logic [1:0]    half;

  gw_pair_scheduler #(.NWS(NWS)) u_sched (
    .clk, .rst_n, .ready, .pc, .sw_avail, .kind, .pair, .half, .sw_issue
  );

  // Instruction of the issue and its lanes.
  logic [SW_-1:0] lead;         // a warp of the issue, for reading the instruction
  dinst_t         inst;
  logic [L-1:0]   lanes;
  logic [NWS-1:0] warps;        // warps issued
  always_comb begin
    lead  = '0;
    warps = '0;
    lanes = '0;
    unique case (kind)
      ISS_PAIR, ISS_SINGLE: begin
        lead = SW_'(2 * pair + (half[0] ? 0 : 1));
        warps[2*pair]   = half[0];
        warps[2*pair+1] = half[1];
        lanes = {{WARP_WIDTH{half[1]}}, {WARP_WIDTH{half[0]}}};
      end
      ISS_WAVE: begin
        for (int w = NWS - 1; w >= 0; w--) if (sw_mask[w]) lead = SW_'(w);
        warps = sw_mask;
        lanes = sw_mask;
      end
      default: ;
    endcase
    inst = rd_inst[lead];
  end

  // ---------------- register read and branch ----------------
  word_t rd_a [L], rd_b [L];
  word_t wb_res [L];
  logic  wb_valid;
  logic [L-1:0] wb_lanes;

  typedef struct packed {
    iss_kind_e      kind;
    logic [PW-1:0]  pair;
    logic           wr;
    reg_t           dst;
    logic [SWW-1:0] swid;
  } meta_t;
  localparam int unsigned MW = $bits(meta_t);
  meta_t in_meta, wb_meta;

  gw_regfile #(.NWS(NWS)) u_rf (
    .clk, .rd_kind(kind), .rd_pair(pair), .rd_src1(inst.src1), .rd_src2(inst.src2),
    .rd_a, .rd_b,
    .wr_valid(wb_valid && wb_meta.wr), .wr_kind(wb_meta.kind), .wr_pair(wb_meta.pair),
    .wr_lanes(wb_lanes), .wr_dst(wb_meta.dst), .wr_data(wb_res),
    .dbg_slot, .dbg_reg, .dbg_data
  );

  always_comb begin
    for (int w = 0; w < NWS; w++) begin
      word_t c;
      logic  taken;
      if (kind == ISS_WAVE) c = rd_a[w];
      else                  c = rd_a[(w % 2) * WARP_WIDTH];
      taken = (inst.op == OP_BNZ && c != '0) || (inst.op == OP_BZ && c == '0);
      iss[w]      = warps[w];
      iss_exit[w] = inst.ex;
      iss_npc[w]  = taken ? inst.imm[PC_W-1:0] : pc[w] + 1'b1;
    end
  end

  // scoreboard reservations at issue
  always_comb begin
    rsv_mask = (kind == ISS_PAIR || kind == ISS_SINGLE) && inst.wr ? warps : '0;
    rsv_dst  = inst.dst;
    wsv      = (kind == ISS_WAVE) && inst.wr;
    wsv_swid = sw_swid;
    wsv_mask = sw_mask;
    wsv_dst  = inst.dst;
  end

  // ---------------- SIMD unit ----------------
  word_t in_wid [L], in_lid [L];
  always_comb begin
    in_meta.kind = kind;
    in_meta.pair = pair;
    in_meta.wr   = inst.wr;
    in_meta.dst  = inst.dst;
    in_meta.swid = sw_swid;
    for (int l = 0; l < L; l++) begin
      if (kind == ISS_WAVE) begin
        in_wid[l] = word_t'(gwid_of(CID, l));
        in_lid[l] = '0;
      end else begin
        in_wid[l] = word_t'(gwid_of(CID, 2 * pair + l / WARP_WIDTH));
        in_lid[l] = word_t'(l % WARP_WIDTH);
      end
    end
  end

  logic [MW-1:0] wb_meta_bits;
  gw_simd_unit #(.LANES(L), .LAT(LAT), .MW(MW)) u_simd (
    .clk, .rst_n, .in_valid(kind != ISS_NONE), .in_op(inst.op), .in_imm(inst.imm),
    .in_lane_en(lanes), .in_a(rd_a), .in_b(rd_b), .in_wid, .in_lid, .in_meta(in_meta),
    .out_valid(wb_valid), .out_res(wb_res), .out_lane_en(wb_lanes), .out_meta(wb_meta_bits)
  );
  assign wb_meta = meta_t'(wb_meta_bits);

  // ---------------- write-back releases ----------------
  always_comb begin
    sb_rel_mask = '0;
    sb_rel_dst  = wb_meta.dst;
    wrel        = wb_valid && wb_meta.kind == ISS_WAVE && wb_meta.wr;
    wrel_swid   = wb_meta.swid;
    sw_rel      = wb_valid && wb_meta.kind == ISS_WAVE;
    sw_rel_swid = wb_meta.swid;
    if (wb_valid && wb_meta.kind != ISS_WAVE && wb_meta.wr) begin
      sb_rel_mask[2*wb_meta.pair]   = wb_lanes[0];
      sb_rel_mask[2*wb_meta.pair+1] = wb_lanes[WARP_WIDTH];
    end
  end

  // ---------------- status ----------------
  logic [3:0] inflight_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) inflight_q <= '0;
    else inflight_q <= inflight_q + 4'(kind != ISS_NONE) - 4'(wb_valid);

  assign idle         = !(|active) && inflight_q == '0 && !(|sw_busy);
  assign ev_pair      = kind == ISS_PAIR;
  assign ev_single    = kind == ISS_SINGLE;
  assign ev_wave      = kind == ISS_WAVE;
  assign ev_wave_size = (kind == ISS_WAVE) ? 5'($countones(sw_mask)) : 5'd0;
  assign ev_hazard    = |(vinst & ~sw_valid & hz);
  assign ev_sw_full   = |(cand & ~join_v);

endmodule
