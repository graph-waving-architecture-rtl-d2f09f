// tb_gw_wst: checks the Warp Status Table slice.
//
// The testbench plays Instruction Storage (a random set of blocks is
// present; the pointer of block b is b mod 48), the fetch unit (fetch and
// fill broadcasts for blocks warps wait on) and the scheduler (random issues
// with random next PC and exit, and scalar-wave joins). A model of each
// warp's state (lookup, ReadyToFetch, I$ miss, valid, done), PC, pointer and
// wave membership is compared with the table every cycle, together with the
// lookup count (all warps waiting on the looked-up PC) and the releases.
module tb_gw_wst;
  import gw_pkg::*;

  localparam int unsigned NWS = 16, NSW = 4, PTR_W = 6, CNT_W = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, fq_valid, fill_valid, lk_valid, lk_hit;
  logic [NWS-1:0] start_mask, iss, iss_exit, join_v, rel_valid, vinst, rtf, icmiss, sw_valid, done, active;
  pc_t iss_npc [NWS], fq_pc, fill_pc, lk_pc, pc [NWS];
  logic [1:0] join_swid [NWS], swid [NWS];
  logic [CNT_W-1:0] lk_count;
  logic [PTR_W-1:0] lk_ptr, rel_ptr [NWS], ptr [NWS];

  gw_wst #(.NWS(NWS), .NSW(NSW), .PTR_W(PTR_W), .CNT_W(CNT_W)) dut (.*);

  typedef enum {M_IDLE, M_LOOKUP, M_RTF, M_ICMISS, M_VALID, M_DONE} ms_e;
  ms_e  ms [NWS];
  pc_t  mpc [NWS];
  int   mptr [NWS];
  bit   msw [NWS];
  int   mswid [NWS];
  bit   present [512];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("FAIL: %s", m);
  endtask

  int n_hit = 0, n_miss = 0, n_fetch = 0, n_fill = 0, n_issue = 0, n_exit = 0, n_multi = 0;

  initial begin
    start = 0; start_mask = 0; iss = 0; iss_exit = 0; join_v = 0; fq_valid = 0; fill_valid = 0;
    fq_pc = 0; fill_pc = 0; lk_hit = 0; lk_ptr = 0;
    foreach (iss_npc[w]) begin iss_npc[w] = 0; join_swid[w] = 0; end
    foreach (present[b]) present[b] = 0;
    foreach (ms[w]) begin ms[w] = M_IDLE; mpc[w] = 0; mptr[w] = 0; msw[w] = 0; mswid[w] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1; start_mask = 16'hBFFF;    // warp 14 not launched
    foreach (ms[w]) ms[w] = start_mask[w] ? M_LOOKUP : M_IDLE;
    for (int n = 0; n < 6000; n++) begin
      int cnt, fb, lb;
      @(negedge clk);
      start = 0;
      iss = 0; iss_exit = 0; join_v = 0; fq_valid = 0; fill_valid = 0;
      // compare state
      for (int w = 0; w < NWS; w++) begin
        checks++;
        if (vinst[w] !== (ms[w] == M_VALID) || rtf[w] !== (ms[w] == M_RTF) || icmiss[w] !== (ms[w] == M_ICMISS) ||
            done[w] !== (ms[w] == M_DONE) || pc[w] !== mpc[w] || sw_valid[w] !== msw[w] ||
            (ms[w] == M_VALID && ptr[w] !== PTR_W'(mptr[w])) || (msw[w] && swid[w] !== 2'(mswid[w])))
          fail($sformatf("warp %0d state mismatch (model %s)", w, ms[w].name()));
      end
      // lookup port: respond as storage
      if (lk_valid) begin
        lb = lk_pc / 2;
        lk_hit = present[lb];
        lk_ptr = PTR_W'(lb % 48);
        cnt = 0;
        foreach (ms[w]) if (ms[w] == M_LOOKUP && mpc[w] == lk_pc) cnt++;
        checks++;
        if (lk_count !== CNT_W'(cnt) || cnt == 0) fail($sformatf("lookup count %0d expected %0d", lk_count, cnt));
        if (cnt > 1) n_multi++;
      end
      // fetch broadcast for a random RTF warp, fill for a random ICMISS warp
      fb = -1; lb = -1;
      foreach (ms[w]) if (ms[w] == M_RTF && $urandom_range(0, 2) == 0) fb = w;
      foreach (ms[w]) if (ms[w] == M_ICMISS && $urandom_range(0, 2) == 0) lb = w;
      if (fb >= 0) begin fq_valid = 1; fq_pc = mpc[fb]; end
      if (lb >= 0) begin fill_valid = 1; fill_pc = mpc[lb]; end
      // scheduler: issue or join some valid warps
      foreach (ms[w])
        if (ms[w] == M_VALID) begin
          if (!msw[w] && $urandom_range(0, 3) == 0) begin join_v[w] = 1; join_swid[w] = 2'($urandom); end
          else if ($urandom_range(0, 2) == 0) begin
            iss[w] = 1; iss_exit[w] = ($urandom_range(0, 40) == 0);
            iss_npc[w] = pc_t'($urandom_range(0, 15));
          end
        end
      #1;
      foreach (ms[w]) begin
        checks++;
        if (rel_valid[w] !== iss[w] || (iss[w] && rel_ptr[w] !== PTR_W'(mptr[w]))) fail("release");
      end
      // model update
      foreach (ms[w]) begin
        case (ms[w])
          M_LOOKUP: if (lk_valid && mpc[w] == lk_pc) begin
            if (lk_hit) begin ms[w] = M_VALID; mptr[w] = int'(lk_ptr); n_hit++; end
            else begin ms[w] = M_RTF; n_miss++; end
          end
          M_RTF: if (fq_valid && fq_pc / 2 == mpc[w] / 2) begin ms[w] = M_ICMISS; n_fetch++; end
          M_ICMISS: if (fill_valid && fill_pc / 2 == mpc[w] / 2) begin ms[w] = M_LOOKUP; n_fill++; end
          M_VALID:
            if (iss[w]) begin
              n_issue++;
              msw[w] = 0;
              if (iss_exit[w]) begin ms[w] = M_DONE; n_exit++; end
              else begin ms[w] = M_LOOKUP; mpc[w] = iss_npc[w]; end
            end else if (join_v[w]) begin msw[w] = 1; mswid[w] = join_swid[w]; end
          default: ;
        endcase
      end
      if (fill_valid) present[fill_pc / 2] = 1;
      if ($urandom_range(0, 200) == 0) foreach (present[b]) present[b] = 0;
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_fetch == 0 || n_fill == 0 || n_issue == 0 || n_exit == 0 || n_multi == 0)
      fail("a case was not reached");
    $display("hit=%0d miss=%0d fetch=%0d fill=%0d issue=%0d exit=%0d shared-lookup=%0d",
             n_hit, n_miss, n_fetch, n_fill, n_issue, n_exit, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
