// tb_gw_swfu: checks the Scalar-Wave Formation Unit.
//
// A model of the Scalar-Wave Status Table follows the same rules as the
// architecture: a ready scalar joins an open (valid, not issued) entry with
// its PC; unmatched scalars at the PC of the lowest-numbered unmatched one
// allocate the lowest free entry; others wait. Waves are issued oldest first
// and released after a random delay. Each cycle the joins, the offered wave
// (ID, mask, PC) and the full-table waits are compared with the model.
// Warps stay out of the candidate set while they belong to a wave.
module tb_gw_swfu;
  import gw_pkg::*;

  localparam int unsigned NWS = 16, NSW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic           start, sw_avail, sw_issue, rel;
  logic [NWS-1:0] cand, join_v, sw_mask;
  pc_t            cand_pc [NWS];
  logic [1:0]     join_swid [NWS], sw_swid, rel_swid;
  pc_t            sw_pc;
  logic [NSW-1:0] busy;

  gw_swfu #(.NWS(NWS), .NSW(NSW)) dut (.*);

  // model
  bit             mv [NSW], mi [NSW];
  pc_t            mp [NSW];
  logic [NWS-1:0] mm [NSW];
  int             mage [NSW];     // allocation time
  int             mdue [NSW];     // release time of an issued wave
  bit             member [NWS];   // warp belongs to a wave not yet issued

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

  int n_join = 0, n_alloc = 0, n_wait = 0, n_issue = 0, n_big = 0;

  initial begin
    start = 0; cand = 0; sw_issue = 0; rel = 0; rel_swid = 0;
    foreach (cand_pc[w]) cand_pc[w] = 0;
    foreach (mv[s]) begin mv[s] = 0; mi[s] = 0; mm[s] = 0; mp[s] = 0; mage[s] = 0; end
    foreach (member[w]) member[w] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      int oldest, lead, fe;
      logic [NWS-1:0] exp_join;
      int exp_id [NWS];
      bit matched [NWS];
      @(negedge clk);
      rel = 0; sw_issue = 0;
      // releases due
      for (int s = 0; s < NSW; s++)
        if (!rel && mv[s] && mi[s] && mdue[s] <= n) begin
          rel = 1; rel_swid = 2'(s);
        end
      // candidates: not members, random, PCs from a small set
      for (int w = 0; w < NWS; w++) begin
        cand[w] = !member[w] && $urandom_range(0, 2) == 0;
        cand_pc[w] = pc_t'($urandom_range(0, 5));
      end
      // oldest open wave
      oldest = -1;
      for (int s = 0; s < NSW; s++)
        if (mv[s] && !mi[s] && (oldest < 0 || mage[s] < mage[oldest])) oldest = s;
      sw_issue = (oldest >= 0) && $urandom_range(0, 3) == 0;
      #1;
      checks++;
      if (sw_avail !== (oldest >= 0)) fail("sw_avail");
      else if (oldest >= 0 && (sw_swid !== 2'(oldest) || sw_mask !== mm[oldest] || sw_pc !== mp[oldest]))
        fail($sformatf("offered wave %0d, expected %0d", sw_swid, oldest));
      // expected joins
      exp_join = 0;
      lead = -1;
      for (int w = 0; w < NWS; w++) begin
        matched[w] = 0;
        exp_id[w] = 0;
        if (cand[w])
          for (int s = 0; s < NSW; s++)
            if (mv[s] && !mi[s] && !(sw_issue && s == oldest) && mp[s] == cand_pc[w]) begin
              matched[w] = 1; exp_join[w] = 1; exp_id[w] = s;
            end
        if (cand[w] && !matched[w] && lead < 0) lead = w;
      end
      fe = -1;
      for (int s = NSW - 1; s >= 0; s--) if (!mv[s]) fe = s;
      if (lead >= 0 && fe >= 0)
        for (int w = 0; w < NWS; w++)
          if (cand[w] && !matched[w] && cand_pc[w] == cand_pc[lead]) begin
            exp_join[w] = 1; exp_id[w] = fe;
          end
      checks++;
      if (join_v !== exp_join) fail($sformatf("joins %b expected %b", join_v, exp_join));
      for (int w = 0; w < NWS; w++)
        if (exp_join[w]) begin
          checks++;
          if (join_swid[w] !== 2'(exp_id[w])) fail($sformatf("warp %0d joined %0d expected %0d", w, join_swid[w], exp_id[w]));
        end
      // update model
      if (rel) begin mv[rel_swid] = 0; mi[rel_swid] = 0; end
      if (sw_issue) begin
        mi[oldest] = 1; mdue[oldest] = n + $urandom_range(1, 6); n_issue++;
        if ($countones(mm[oldest]) > 1) n_big++;
        for (int w = 0; w < NWS; w++) if (mm[oldest][w]) member[w] = 0;
      end
      if (lead >= 0 && fe >= 0) begin
        mv[fe] = 1; mi[fe] = 0; mp[fe] = cand_pc[lead]; mm[fe] = 0; mage[fe] = n; n_alloc++;
      end
      for (int w = 0; w < NWS; w++) begin
        if (exp_join[w]) begin mm[exp_id[w]][w] = 1; member[w] = 1; n_join++; end
        else if (cand[w]) n_wait++;
      end
    end
    checks++;
    if (n_alloc == 0 || n_wait == 0 || n_issue == 0 || n_big == 0) fail("a case was not reached");
    $display("joins=%0d allocs=%0d waits=%0d issues=%0d multi=%0d", n_join, n_alloc, n_wait, n_issue, n_big);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
