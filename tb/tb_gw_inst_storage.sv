// tb_gw_inst_storage: checks Instruction Storage.
//
// Runs random inserts, lookups (with reference counts) and releases against
// a model that holds, per set, which blocks are present and how many warps
// reference each. Checks hit/miss, the data read back through the returned
// pointer, the reference counters, that a fully referenced set refuses an
// insert (ins_ready low) and that an unreferenced entry is replaced. A few
// PCs that share one set are used so the set fills up quickly.
module tb_gw_inst_storage;
  import gw_pkg::*;

  localparam int unsigned SETS = 16, WAYS = 3, NLK = 2, NRD = 4;
  localparam int unsigned PTR_W = $clog2(SETS * WAYS), CNT_W = $clog2(NRD + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NLK-1:0]   lk_valid, lk_hit;
  pc_t              lk_pc [NLK];
  logic [CNT_W-1:0] lk_count [NLK];
  logic [PTR_W-1:0] lk_ptr [NLK];
  logic [NRD-1:0]   rel_valid;
  logic [PTR_W-1:0] rel_ptr [NRD];
  logic             ins_valid, ins_ready;
  pc_t              ins_pc;
  dinst_t           ins_inst [2];
  logic [1:0]       ins_scalar;
  logic [PTR_W-1:0] rd_ptr [NRD];
  logic             rd_slot [NRD];
  dinst_t           rd_inst [NRD];
  logic             rd_scalar [NRD];
  logic [CNT_W-1:0] refcnt_o [SETS*WAYS];

  gw_inst_storage #(.SETS(SETS), .WAYS(WAYS), .NLK(NLK), .NRD(NRD)) dut (.*);

  // model: per entry (set*WAYS+way) its block and references; ways are
  // filled lowest invalid first, else the lowest way with no references
  bit mv [SETS*WAYS];
  int mb [SETS*WAYS];
  int mr [SETS*WAYS];
  int held [NRD];   // entry each warp holds, -1 none
  int held_n [NRD]; // references it still holds (a lookup may serve several)

  // a lookup serves 1..3 waiting warps; all references together stay within
  // the number of warps, as in the core
  function automatic int lk_n();
    int tot = 0, c;
    foreach (held_n[r]) tot += held_n[r];
    c = $urandom_range(1, 3);
    return (c > NRD - tot) ? NRD - tot : c;
  endfunction

  function automatic dinst_t mk(int blk, int k);
    dinst_t d;
    d = '0;
    d.imm = 12'(blk * 2 + k);
    d.op  = opcode_e'((blk + k) % 16);
    return d;
  endfunction

  function automatic int find(int blk);
    for (int w = 0; w < WAYS; w++) begin
      int e = (blk % SETS) * WAYS + w;
      if (mv[e] && mb[e] == blk) return e;
    end
    return -1;
  endfunction

  function automatic int victim(int blk);
    for (int w = 0; w < WAYS; w++) if (!mv[(blk % SETS) * WAYS + w]) return (blk % SETS) * WAYS + w;
    for (int w = 0; w < WAYS; w++) if (mr[(blk % SETS) * WAYS + w] == 0) return (blk % SETS) * WAYS + w;
    return -1;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_full = 0, n_hit = 0, n_miss = 0, n_evict = 0;

  initial begin
    lk_valid = 0; rel_valid = 0; ins_valid = 0; ins_pc = 0; ins_scalar = 0;
    foreach (lk_pc[p]) begin lk_pc[p] = 0; lk_count[p] = 0; end
    foreach (rel_ptr[r]) begin rel_ptr[r] = 0; rd_ptr[r] = 0; rd_slot[r] = 0; held[r] = -1; held_n[r] = 0; end
    ins_inst[0] = '0; ins_inst[1] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (mv[e]) begin mv[e] = 0; mb[e] = 0; mr[e] = 0; end
    for (int n = 0; n < 4000; n++) begin
      int blk, w, action, e, c;
      @(negedge clk);
      lk_valid = 0; rel_valid = 0; ins_valid = 0;
      // blocks 0,16,32,48,64 share set 0; 1,17,... set 1
      blk = (($urandom_range(0, 3) == 0) ? 1 : 0) + SETS * $urandom_range(0, 4);
      action = $urandom_range(0, 2);
      w = $urandom_range(0, NRD - 1);
      e = find(blk);
      c = lk_n();
      if (action == 0) begin
        ins_valid = 1; ins_pc = pc_t'(blk * 2);
        ins_inst[0] = mk(blk, 0); ins_inst[1] = mk(blk, 1); ins_scalar = 2'(blk);
        #1;
        checks++;
        if (e >= 0) begin
          if (!ins_ready) begin failures++; $display("FAIL: present block refused"); end
        end else begin
          int v;
          v = victim(blk);
          if (ins_ready !== (v >= 0)) begin
            failures++; $display("FAIL: ins_ready %0b for block %0d", ins_ready, blk);
          end
          if (v < 0) n_full++;
          else begin
            if (mv[v]) n_evict++;
            mv[v] = 1; mb[v] = blk; mr[v] = 0;
          end
        end
      end else if (action == 1 && held[w] < 0 && c > 0) begin
        lk_valid[1] = 1; lk_pc[1] = pc_t'(blk * 2 + $urandom_range(0, 1)); lk_count[1] = CNT_W'(c);
        #1;
        checks++;
        if (lk_hit[1] !== (e >= 0) || (e >= 0 && lk_ptr[1] !== PTR_W'(e))) begin
          failures++; $display("FAIL: lookup of block %0d hit %0b ptr %0d, expected entry %0d", blk, lk_hit[1], lk_ptr[1], e);
        end
        if (e >= 0) begin
          n_hit++;
          held[w] = e; held_n[w] = int'(lk_count[1]); mr[e] += held_n[w];
          rd_ptr[w] = PTR_W'(e); rd_slot[w] = lk_pc[1][0];
          #1;
          checks++;
          if (rd_inst[w] !== mk(blk, lk_pc[1][0]) || rd_scalar[w] !== 1'(blk >> lk_pc[1][0])) begin
            failures++; $display("FAIL: wrong data for block %0d", blk);
          end
        end else n_miss++;
      end else if (held[w] >= 0) begin
        rel_valid[w] = 1; rel_ptr[w] = PTR_W'(held[w]);
        mr[held[w]]--; held_n[w]--;
        if (held_n[w] == 0) held[w] = -1;
      end
      @(posedge clk); #1;
      foreach (mv[k]) begin
        checks++;
        if (refcnt_o[k] !== CNT_W'(mr[k])) begin
          failures++; $display("FAIL: refcnt of entry %0d = %0d, expected %0d", k, refcnt_o[k], mr[k]);
        end
      end
    end
    checks++;
    if (n_full == 0 || n_hit == 0 || n_miss == 0 || n_evict == 0) begin
      failures++; $display("FAIL: case not reached full=%0d hit=%0d miss=%0d evict=%0d", n_full, n_hit, n_miss, n_evict);
    end
    $display("full=%0d hit=%0d miss=%0d evict=%0d", n_full, n_hit, n_miss, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
