// gw_wst: Warp Status Table of one scheduler (its 8 even and 8 odd warps).
//
// For each warp it keeps the PC, a pointer to the warp's next decoded
// instruction in Instruction Storage (valid when "Valid Inst." is set), the
// ReadyToFetch and I$-miss flags and the scalar-wave membership (SW-Valid and
// SWID). The per-warp next-instruction state moves
//   LOOKUP -> VALID            next PC found in Instruction Storage
//   LOOKUP -> RTF -> ICMISS    not found: wait for fetch arbitration, then for
//                              the fetched pair to be inserted (back to LOOKUP)
//   VALID  -> LOOKUP / DONE    on issue (new PC) or on an exit instruction.
// After an issue the old storage entry is released (its reference counter is
// decremented) and the new PC is looked up. One lookup per cycle is made for
// the table; every warp waiting on the same PC is served by it, so the
// storage counter is raised by the number of those warps.
//
// Interface: launch (start + active mask, PC 0); issue events per warp with
// their next PC and exit flag; scalar-wave joins per warp with SWID; fetch
// and fill broadcasts from the fetch unit; one Instruction Storage lookup
// port; per-warp release port. The architecture's table also lists a
// "Master PC" column without defining its use; it is not kept here.
// Column set, ReadyToFetch and pointer follow the architecture; the state
// encoding, the I$-miss wait state and the shared lookup are this design's.
module gw_wst
  import gw_pkg::*;
#(
  parameter int unsigned NWS  = WARPS_PER_SCHED,
  parameter int unsigned NSW  = 4,          // scalar-wave IDs
  parameter int unsigned PTR_W = 6,
  parameter int unsigned CNT_W = 7,
  localparam int unsigned SWW = $clog2(NSW),
  localparam int unsigned SW_ = $clog2(NWS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // launch
  input  logic               start,
  input  logic [NWS-1:0]     start_mask,
  // issue events
  input  logic [NWS-1:0]     iss,
  input  pc_t                iss_npc  [NWS],
  input  logic [NWS-1:0]     iss_exit,
  // scalar-wave joins
  input  logic [NWS-1:0]     join_v,
  input  logic [SWW-1:0]     join_swid [NWS],
  // fetch unit broadcasts
  input  logic               fq_valid,
  input  pc_t                fq_pc,
  input  logic               fill_valid,
  input  pc_t                fill_pc,
  // instruction storage lookup
  output logic               lk_valid,
  output pc_t                lk_pc,
  output logic [CNT_W-1:0]   lk_count,
  input  logic               lk_hit,
  input  logic [PTR_W-1:0]   lk_ptr,
  // release
  output logic [NWS-1:0]     rel_valid,
  output logic [PTR_W-1:0]   rel_ptr [NWS],
  // status
  output pc_t                pc     [NWS],
  output logic [PTR_W-1:0]   ptr    [NWS],
  output logic [NWS-1:0]     vinst,        // valid instruction
  output logic [NWS-1:0]     rtf,          // ReadyToFetch
  output logic [NWS-1:0]     icmiss,
  output logic [NWS-1:0]     sw_valid,
  output logic [SWW-1:0]     swid   [NWS],
  output logic [NWS-1:0]     done,
  output logic [NWS-1:0]     active
);

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_RTF, S_ICMISS, S_VALID, S_DONE} wstate_e;

  wstate_e          st_q  [NWS];
  pc_t              pc_q  [NWS];
  logic [PTR_W-1:0] ptr_q [NWS];
  logic [NWS-1:0]   swv_q;
  logic [SWW-1:0]   swid_q [NWS];

  // ---------------- lookup port ----------------
  logic [NWS-1:0] need;
  logic           lgv;
  logic [SW_-1:0] lgi;
  logic [NWS-1:0] same;   // waiting warps with the looked-up PC

  always_comb for (int w = 0; w < NWS; w++) need[w] = (st_q[w] == S_LOOKUP);

  gw_rr_arbiter #(.N(NWS)) u_arb (
    .clk, .rst_n, .req(need), .adv(1'b1), .gnt_valid(lgv), .gnt_idx(lgi)
  );

  always_comb begin
    lk_valid = lgv;
    lk_pc    = pc_q[lgi];
    lk_count = '0;
    for (int w = 0; w < NWS; w++) begin
      same[w] = lgv && need[w] && pc_q[w] == pc_q[lgi];
      if (same[w]) lk_count = lk_count + 1'b1;
    end
  end

  // ---------------- state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < NWS; w++) begin
        st_q[w]   <= S_IDLE;
        pc_q[w]   <= '0;
        ptr_q[w]  <= '0;
        swid_q[w] <= '0;
      end
      swv_q <= '0;
    end else if (start) begin
      for (int w = 0; w < NWS; w++) begin
        st_q[w] <= start_mask[w] ? S_LOOKUP : S_IDLE;
        pc_q[w] <= '0;
      end
      swv_q <= '0;
    end else begin
      for (int w = 0; w < NWS; w++) begin
        unique case (st_q[w])
          S_LOOKUP:
            if (same[w]) begin
              if (lk_hit) begin
                st_q[w]  <= S_VALID;
                ptr_q[w] <= lk_ptr;
              end else begin
                st_q[w] <= S_RTF;
              end
            end
          S_RTF:
            if (fq_valid && fq_pc[PC_W-1:1] == pc_q[w][PC_W-1:1]) st_q[w] <= S_ICMISS;
          S_ICMISS:
            if (fill_valid && fill_pc[PC_W-1:1] == pc_q[w][PC_W-1:1]) st_q[w] <= S_LOOKUP;
          S_VALID:
            if (iss[w]) begin
              swv_q[w] <= 1'b0;
              if (iss_exit[w]) st_q[w] <= S_DONE;
              else begin
                st_q[w] <= S_LOOKUP;
                pc_q[w] <= iss_npc[w];
              end
            end else if (join_v[w]) begin
              swv_q[w]  <= 1'b1;
              swid_q[w] <= join_swid[w];
            end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    for (int w = 0; w < NWS; w++) begin
      pc[w]        = pc_q[w];
      ptr[w]       = ptr_q[w];
      swid[w]      = swid_q[w];
      vinst[w]     = (st_q[w] == S_VALID);
      rtf[w]       = (st_q[w] == S_RTF);
      icmiss[w]    = (st_q[w] == S_ICMISS);
      done[w]      = (st_q[w] == S_DONE);
      active[w]    = (st_q[w] != S_IDLE) && (st_q[w] != S_DONE);
      rel_valid[w] = iss[w] && (st_q[w] == S_VALID);
      rel_ptr[w]   = ptr_q[w];
    end
    sw_valid = swv_q;
  end

  always_ff @(posedge clk)
    if (rst_n)
      for (int w = 0; w < NWS; w++)
        assert (!(iss[w] || join_v[w]) || st_q[w] == S_VALID)
          else $error("warp %0d issued or joined a scalar-wave without a valid instruction", w);

endmodule
