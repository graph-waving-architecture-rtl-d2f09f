// gw_inst_storage: Instruction Storage of the GW front end.
//
// Decoded instructions are kept apart from the warps, in a set-associative
// store shared by all warps of the core, so that one fetch and decode serves
// every warp (and every loop iteration) that reaches the same PC. Each entry
// holds a tag, a Valid bit, a Reference Counter, Scalar flags and two decoded
// instructions (an aligned pair of PCs, 2k and 2k+1), as the architecture
// describes. The counter holds how many warps currently point at the entry;
// only an entry nobody points at may be replaced.
//
// Ports (all lookups and reads combinational, updates at the clock edge):
//   lookup  lk_valid/lk_pc/lk_count -> lk_hit/lk_ptr. A hit adds lk_count
//           (the number of warps waiting on that PC) to the entry's counter.
//   release rel_valid/rel_ptr, one per warp: subtracts one per releasing warp.
//   insert  ins_valid/ins_pc/ins_inst/ins_scalar -> ins_ready. The victim is
//           the first invalid way, else the first way with a zero counter
//           that no lookup hits this cycle. If the pair is already present the
//           insert is accepted and dropped. ins_ready low means every way of
//           the set is referenced and the caller must hold the insert.
//   read    rd_ptr/rd_slot -> rd_inst/rd_scalar, one per warp.
//
// Design choices: the Scalar flag is kept per instruction of the pair (two
// bits) so both instructions of an entry can differ; 16 sets x 3 ways gives
// 48 entries = 96 decoded instructions, the size of a 2-instruction-per-warp
// buffer for 48 warps, since the storage is not meant to grow. Way choice is
// fixed priority, not LRU.
module gw_inst_storage
  import gw_pkg::*;
#(
  parameter int unsigned SETS   = 16,
  parameter int unsigned WAYS   = 3,
  parameter int unsigned NLK    = NUM_SCHED,  // lookup ports
  parameter int unsigned NRD    = NUM_WARPS,  // read / release ports
  localparam int unsigned ENTRIES = SETS * WAYS,
  localparam int unsigned PTR_W   = $clog2(ENTRIES),
  localparam int unsigned SET_W   = $clog2(SETS),
  localparam int unsigned TAG_W   = PC_W - 1 - SET_W,
  localparam int unsigned CNT_W   = $clog2(NRD + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup
  input  logic [NLK-1:0]       lk_valid,
  input  pc_t                  lk_pc    [NLK],
  input  logic [CNT_W-1:0]     lk_count [NLK],
  output logic [NLK-1:0]       lk_hit,
  output logic [PTR_W-1:0]     lk_ptr   [NLK],
  // release
  input  logic [NRD-1:0]       rel_valid,
  input  logic [PTR_W-1:0]     rel_ptr  [NRD],
  // insert
  input  logic                 ins_valid,
  input  pc_t                  ins_pc,
  input  dinst_t               ins_inst   [2],
  input  logic [1:0]           ins_scalar,
  output logic                 ins_ready,
  // read
  input  logic [PTR_W-1:0]     rd_ptr  [NRD],
  input  logic                 rd_slot [NRD],
  output dinst_t               rd_inst [NRD],
  output logic                 rd_scalar [NRD],
  // status
  output logic [CNT_W-1:0]     refcnt_o [ENTRIES]
);

  // Instruction tags and data array.
  logic [TAG_W-1:0] tag_q   [ENTRIES];
  logic             valid_q [ENTRIES];
  logic [CNT_W-1:0] cnt_q   [ENTRIES];
  logic [1:0]       scal_q  [ENTRIES];
  dinst_t           data_q  [ENTRIES][2];

  function automatic logic [SET_W-1:0] set_of(pc_t pc);
    return pc[SET_W:1];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(pc_t pc);
    return pc[PC_W-1:SET_W+1];
  endfunction

  function automatic logic [PTR_W-1:0] eidx(pc_t pc, int unsigned way);
    return PTR_W'(int'(set_of(pc)) * WAYS + way);
  endfunction

  // ---------------- lookup ----------------
  logic [ENTRIES-1:0] hit_any;   // entry hit by some port this cycle
  always_comb begin
    hit_any = '0;
    for (int p = 0; p < NLK; p++) begin
      lk_hit[p] = 1'b0;
      lk_ptr[p] = '0;
      for (int w = 0; w < WAYS; w++)
        if (lk_valid[p] && valid_q[eidx(lk_pc[p], w)] && tag_q[eidx(lk_pc[p], w)] == tag_of(lk_pc[p])) begin
          lk_hit[p] = 1'b1;
          lk_ptr[p] = eidx(lk_pc[p], w);
          hit_any[eidx(lk_pc[p], w)] = 1'b1;
        end
    end
  end

  // ---------------- insert victim ----------------
  logic             ins_present;
  logic             victim_ok;
  logic [PTR_W-1:0] victim;
  always_comb begin
    ins_present = 1'b0;
    victim_ok   = 1'b0;
    victim      = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid_q[eidx(ins_pc, w)] && tag_q[eidx(ins_pc, w)] == tag_of(ins_pc)) ins_present = 1'b1;
    // invalid ways first
    for (int w = WAYS - 1; w >= 0; w--)
      if (!valid_q[eidx(ins_pc, w)]) begin victim_ok = 1'b1; victim = eidx(ins_pc, w); end
    if (!victim_ok)
      for (int w = WAYS - 1; w >= 0; w--)
        if (cnt_q[eidx(ins_pc, w)] == '0 && !hit_any[eidx(ins_pc, w)]) begin
          victim_ok = 1'b1;
          victim    = eidx(ins_pc, w);
        end
    ins_ready = ins_present || victim_ok;
  end

  // ---------------- counter update ----------------
  logic [CNT_W-1:0] inc [ENTRIES];
  logic [CNT_W-1:0] dec [ENTRIES];
  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      inc[e] = '0;
      dec[e] = '0;
    end
    for (int p = 0; p < NLK; p++)
      if (lk_hit[p]) inc[lk_ptr[p]] = inc[lk_ptr[p]] + lk_count[p];
    for (int r = 0; r < NRD; r++)
      if (rel_valid[r]) dec[rel_ptr[r]] = dec[rel_ptr[r]] + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        valid_q[e] <= 1'b0;
        cnt_q[e]   <= '0;
        tag_q[e]   <= '0;
        scal_q[e]  <= '0;
      end
    end else begin
      for (int e = 0; e < ENTRIES; e++)
        cnt_q[e] <= cnt_q[e] + inc[e] - dec[e];
      if (ins_valid && !ins_present && victim_ok) begin
        valid_q[victim] <= 1'b1;
        tag_q[victim]   <= tag_of(ins_pc);
        scal_q[victim]  <= ins_scalar;
      end
    end
  end

  // Data array: written on insert only, no reset needed (guarded by valid).
  always_ff @(posedge clk) begin
    if (ins_valid && !ins_present && victim_ok) begin
      data_q[victim][0] <= ins_inst[0];
      data_q[victim][1] <= ins_inst[1];
    end
  end

  // ---------------- read ----------------
  always_comb begin
    for (int r = 0; r < NRD; r++) begin
      rd_inst[r]   = data_q[rd_ptr[r]][rd_slot[r]];
      rd_scalar[r] = scal_q[rd_ptr[r]][rd_slot[r]];
    end
  end

  always_comb for (int e = 0; e < ENTRIES; e++) refcnt_o[e] = cnt_q[e];

  // A release must never take a counter below zero.
  always_ff @(posedge clk)
    if (rst_n)
      for (int e = 0; e < ENTRIES; e++)
        assert (cnt_q[e] + inc[e] >= dec[e])
          else $error("instruction storage entry %0d reference counter underflow", e);

endmodule
