// gw_swfu: Scalar-Wave Formation Unit with its Scalar-Wave Status Table (SWST).
//
// A warp whose next instruction is scalar and free of register hazards is a
// candidate. Each SWST entry (SWID, PC, Valid, SW-Mask, Issued) gathers the
// scalar instructions of one PC. In a cycle every candidate whose PC matches
// a valid, not yet issued entry joins it (its SW-Mask bit is set). Of the
// candidates that match nothing, the lowest-numbered one allocates a free
// entry, together with every other unmatched candidate at the same PC. A
// candidate that finds neither waits. When the scheduler has no ready warp it
// takes the oldest valid, not issued wave (issue sets Issued); the wave's
// entry is freed when the wave writes back. The SWID is the entry index.
//
// Interface: cand/cand_pc per warp -> join_v/join_swid per warp (same cycle);
// sw_avail/sw_swid/sw_mask/sw_pc describe the oldest issuable wave; sw_issue
// takes it; rel/rel_swid free an entry. Ages are kept in an age matrix.
// Entry count is this design's choice.
module gw_swfu
  import gw_pkg::*;
#(
  parameter int unsigned NWS = WARPS_PER_SCHED,
  parameter int unsigned NSW = 4,
  localparam int unsigned SWW = $clog2(NSW)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,        // clears the table at kernel launch
  input  logic [NWS-1:0]   cand,
  input  pc_t              cand_pc [NWS],
  output logic [NWS-1:0]   join_v,
  output logic [SWW-1:0]   join_swid [NWS],
  output logic             sw_avail,
  output logic [SWW-1:0]   sw_swid,
  output logic [NWS-1:0]   sw_mask,
  output pc_t              sw_pc,
  input  logic             sw_issue,
  input  logic             rel,
  input  logic [SWW-1:0]   rel_swid,
  output logic [NSW-1:0]   busy          // valid entries
);

  logic [NSW-1:0]  v_q, iss_q;
  pc_t             pc_q   [NSW];
  logic [NWS-1:0]  mask_q [NSW];
  logic [NSW-1:0]  older_q [NSW];   // older_q[i][j]: entry j is older than i

  // ---------------- oldest issuable wave ----------------
  always_comb begin
    sw_avail = 1'b0;
    sw_swid  = '0;
    for (int i = 0; i < NSW; i++) begin
      logic oldest;
      oldest = v_q[i] && !iss_q[i];
      for (int j = 0; j < NSW; j++)
        if (j != i && v_q[j] && !iss_q[j] && older_q[i][j]) oldest = 1'b0;
      if (oldest && !sw_avail) begin
        sw_avail = 1'b1;
        sw_swid  = SWW'(i);
      end
    end
    sw_mask = mask_q[sw_swid];
    sw_pc   = pc_q[sw_swid];
  end

  // ---------------- joins and allocation ----------------
  logic [NSW-1:0] open_e;   // entries that can still take members
  logic           alloc_v;
  logic [SWW-1:0] alloc_e;
  logic           lead_v;
  pc_t            lead_pc;
  logic [NWS-1:0] matched;

  always_comb begin
    for (int e = 0; e < NSW; e++)
      open_e[e] = v_q[e] && !iss_q[e] && !(sw_issue && sw_swid == SWW'(e));
    alloc_v = 1'b0;
    alloc_e = '0;
    for (int e = NSW - 1; e >= 0; e--)
      if (!v_q[e]) begin alloc_v = 1'b1; alloc_e = SWW'(e); end
    join_v  = '0;
    matched = '0;
    for (int w = 0; w < NWS; w++) begin
      join_swid[w] = '0;
      for (int e = 0; e < NSW; e++)
        if (cand[w] && open_e[e] && pc_q[e] == cand_pc[w]) begin
          matched[w]   = 1'b1;
          join_v[w]    = 1'b1;
          join_swid[w] = SWW'(e);
        end
    end
    lead_v  = 1'b0;
    lead_pc = '0;
    for (int w = NWS - 1; w >= 0; w--)
      if (cand[w] && !matched[w]) begin lead_v = 1'b1; lead_pc = cand_pc[w]; end
    if (lead_v && alloc_v)
      for (int w = 0; w < NWS; w++)
        if (cand[w] && !matched[w] && cand_pc[w] == lead_pc) begin
          join_v[w]    = 1'b1;
          join_swid[w] = alloc_e;
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q   <= '0;
      iss_q <= '0;
      for (int e = 0; e < NSW; e++) begin
        pc_q[e]    <= '0;
        mask_q[e]  <= '0;
        older_q[e] <= '0;
      end
    end else if (start) begin
      v_q   <= '0;
      iss_q <= '0;
    end else begin
      if (rel) begin
        v_q[rel_swid]   <= 1'b0;
        iss_q[rel_swid] <= 1'b0;
      end
      if (sw_issue) iss_q[sw_swid] <= 1'b1;
      for (int e = 0; e < NSW; e++)
        for (int w = 0; w < NWS; w++)
          if (join_v[w] && join_swid[w] == SWW'(e) && !(lead_v && alloc_v && alloc_e == SWW'(e)))
            mask_q[e][w] <= 1'b1;
      if (lead_v && alloc_v) begin
        v_q[alloc_e]   <= 1'b1;
        iss_q[alloc_e] <= 1'b0;
        pc_q[alloc_e]  <= lead_pc;
        for (int w = 0; w < NWS; w++)
          mask_q[alloc_e][w] <= join_v[w] && join_swid[w] == alloc_e;
        for (int j = 0; j < NSW; j++) begin
          older_q[alloc_e][j] <= v_q[j] && SWW'(j) != alloc_e;
          older_q[j][alloc_e] <= 1'b0;
        end
      end
    end
  end

  assign busy = v_q;

  always_ff @(posedge clk)
    if (rst_n) begin
      assert (!(sw_issue && !sw_avail)) else $error("scalar-wave issued with none available");
      assert (!(rel && !(v_q[rel_swid] && iss_q[rel_swid])))
        else $error("scalar-wave %0d released but not in flight", rel_swid);
    end

endmodule
