// gw_fetch_unit: instruction fetch, decode and fill of Instruction Storage.
//
// Only warps whose ReadyToFetch flag is set (their next PC missed in
// Instruction Storage) take part in fetch arbitration, which is round-robin.
// As long as a fetch buffer is free one new fetch is sent to the instruction
// cache per cycle. A fetch covers an aligned pair of instructions (the
// contents of one storage entry). The chosen warp's block is broadcast on
// fq_valid/fq_pc so that every ReadyToFetch warp waiting on the same block
// moves to its I$-miss (waiting) state; when the block is already in a
// buffer the broadcast is made without a new cache request. Returned words
// are decoded and inserted into Instruction Storage, one buffer per cycle;
// the insert is broadcast on fill_valid/fill_pc so waiting warps look the PC
// up again.
//
// Interface: instruction cache request (ic_req_*, tag = buffer index, ready
// handshake) and response (ic_rsp_*, any order, any latency). Timing: fetch
// broadcast in the grant cycle, fill broadcast in the cycle the storage
// accepts the insert. Buffer count and pairing are this design's choices.
module gw_fetch_unit
  import gw_pkg::*;
#(
  parameter int unsigned NW    = NUM_WARPS,
  parameter int unsigned NBUF  = 2,
  localparam int unsigned BW   = (NBUF > 1) ? $clog2(NBUF) : 1,
  localparam int unsigned WW   = $clog2(NW)
) (
  input  logic              clk,
  input  logic              rst_n,
  // warp status
  input  logic [NW-1:0]     rtf,
  input  pc_t               warp_pc [NW],
  // fetch broadcast to the warp status tables
  output logic              fq_valid,
  output pc_t               fq_pc,
  output logic              fq_new,      // a new cache request was sent
  // instruction cache
  output logic              ic_req_valid,
  output pc_t               ic_req_pc,
  output logic [BW-1:0]     ic_req_tag,
  input  logic              ic_req_ready,
  input  logic              ic_rsp_valid,
  input  logic [BW-1:0]     ic_rsp_tag,
  input  logic [31:0]       ic_rsp_data [2],
  // instruction storage insert
  output logic              ins_valid,
  output pc_t               ins_pc,
  output dinst_t            ins_inst [2],
  output logic [1:0]        ins_scalar,
  input  logic              ins_ready,
  // fill broadcast
  output logic              fill_valid,
  output pc_t               fill_pc
);

  typedef enum logic [1:0] {B_FREE, B_WAIT, B_FULL} bstate_e;

  bstate_e          st_q   [NBUF];
  pc_t              pc_q   [NBUF];
  dinst_t           inst_q [NBUF][2];
  logic [1:0]       scal_q [NBUF];

  // ---------------- arbitration ----------------
  logic          gv;
  logic [WW-1:0] gi;
  logic          grant_use;

  gw_rr_arbiter #(.N(NW)) u_arb (
    .clk, .rst_n, .req(rtf), .adv(grant_use), .gnt_valid(gv), .gnt_idx(gi)
  );

  pc_t blk;
  assign blk = {warp_pc[gi][PC_W-1:1], 1'b0};

  // Insert: lowest full buffer.
  logic          ins_sel_v;
  logic [BW-1:0] ins_sel;
  always_comb begin
    ins_sel_v = 1'b0;
    ins_sel   = '0;
    for (int b = NBUF - 1; b >= 0; b--)
      if (st_q[b] == B_FULL) begin ins_sel_v = 1'b1; ins_sel = BW'(b); end
  end
  assign ins_valid  = ins_sel_v;
  assign ins_pc     = pc_q[ins_sel];
  assign ins_inst   = inst_q[ins_sel];
  assign ins_scalar = scal_q[ins_sel];
  assign fill_valid = ins_sel_v && ins_ready;
  assign fill_pc    = pc_q[ins_sel];

  // Block already in flight (and not being freed this cycle)?
  logic          inflight;
  logic          free_v;
  logic [BW-1:0] free_b;
  always_comb begin
    inflight = 1'b0;
    free_v   = 1'b0;
    free_b   = '0;
    for (int b = NBUF - 1; b >= 0; b--) begin
      if (st_q[b] != B_FREE && pc_q[b] == blk &&
          !(fill_valid && ins_sel == BW'(b)))
        inflight = 1'b1;
      if (st_q[b] == B_FREE) begin free_v = 1'b1; free_b = BW'(b); end
    end
  end

  assign fq_new       = gv && !inflight && free_v && ic_req_ready;
  assign grant_use    = gv && (inflight || fq_new);
  assign fq_valid     = grant_use;
  assign fq_pc        = blk;
  assign ic_req_valid = gv && !inflight && free_v;
  assign ic_req_pc    = blk;
  assign ic_req_tag   = free_b;

  // ---------------- decode ----------------
  dinst_t     dec_inst [2];
  logic [1:0] dec_scal;
  for (genvar k = 0; k < 2; k++) begin : g_dec
    gw_decode u_dec (.instr(ic_rsp_data[k]), .dinst(dec_inst[k]), .scalar(dec_scal[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBUF; b++) begin
        st_q[b] <= B_FREE;
        pc_q[b] <= '0;
      end
    end else begin
      if (fill_valid) st_q[ins_sel] <= B_FREE;
      if (fq_new) begin
        st_q[free_b] <= B_WAIT;
        pc_q[free_b] <= blk;
      end
      if (ic_rsp_valid) st_q[ic_rsp_tag] <= B_FULL;
    end
  end

  always_ff @(posedge clk) begin
    if (ic_rsp_valid) begin
      inst_q[ic_rsp_tag] <= dec_inst;
      scal_q[ic_rsp_tag] <= dec_scal;
    end
  end

  always_ff @(posedge clk)
    if (rst_n && ic_rsp_valid)
      assert (st_q[ic_rsp_tag] == B_WAIT)
        else $error("instruction cache response for buffer %0d not waiting", ic_rsp_tag);

endmodule
