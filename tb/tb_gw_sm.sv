// tb_gw_sm: end-to-end test of the GW core at its default parameters.
//
// Loads the edge-list-expansion kernel of gw_tb_pkg into a behavioural
// instruction cache, launches all 64 warps, waits until the core is idle and
// compares every register each warp wrote against an independent sequential
// model of that warp. A second launch with 21 warps follows (partly filled
// schedulers, unpaired warps). Counts how often each mechanism happened:
// paired issue, single issue, scalar-wave issue, waves packing several
// scalars, scoreboard stalls, storage hits and misses (instruction reuse),
// new fetches, fetches joined in flight, inserts held by a fully referenced
// set, cycles with all four schedulers issuing. Each must occur at least
// once. Also checks the issue width: never more than 4 issues per cycle.
module tb_gw_sm;
  import gw_pkg::*;
  import gw_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                 start;
  logic [GWID_W:0]      nwarps;
  logic                 ic_req_valid, ic_req_ready, ic_rsp_valid;
  pc_t                  ic_req_pc;
  logic [0:0]           ic_req_tag, ic_rsp_tag;
  logic [31:0]          ic_rsp_data [2];
  logic [GWID_W-1:0]    dbg_gwid;
  reg_t                 dbg_reg;
  word_t                dbg_data [WARP_WIDTH];
  logic                 idle;
  logic [NUM_SCHED-1:0] ev_pair, ev_single, ev_wave, ev_hazard, ev_sw_full, ev_lk_hit, ev_lk_miss;
  logic [4:0]           ev_wave_size [NUM_SCHED];
  logic                 ev_fetch, ev_fetch_join, ev_ins_stall;

  gw_sm dut (.*);

  gw_icache_model #(.BW(1), .MAXLAT(4)) u_ic (
    .clk, .rst_n, .req_valid(ic_req_valid), .req_pc(ic_req_pc), .req_tag(ic_req_tag),
    .req_ready(ic_req_ready), .rsp_valid(ic_rsp_valid), .rsp_tag(ic_rsp_tag),
    .rsp_data(ic_rsp_data)
  );

  // ---------------- event counters ----------------
  int n_pair, n_single, n_wave, n_packed, n_hazard, n_swfull, n_hit, n_miss;
  int n_fetch, n_join, n_stall, n_quad, n_cycles, n_issued_instr, max_wave;
  always @(posedge clk) if (rst_n) begin
    int iss;
    iss = 0;
    n_cycles++;
    for (int c = 0; c < NUM_SCHED; c++) begin
      n_pair   += ev_pair[c];
      n_single += ev_single[c];
      n_wave   += ev_wave[c];
      n_packed += (ev_wave_size[c] > 1);
      if (ev_wave_size[c] > max_wave) max_wave = ev_wave_size[c];
      n_hazard += ev_hazard[c];
      n_swfull += ev_sw_full[c];
      n_hit    += ev_lk_hit[c];
      n_miss   += ev_lk_miss[c];
      iss      += ev_pair[c] + ev_single[c] + ev_wave[c];
      n_issued_instr += 2 * ev_pair[c] + ev_single[c] + ev_wave_size[c];
    end
    n_fetch += ev_fetch;
    n_join  += ev_fetch_join;
    n_stall += ev_ins_stall;
    if (iss == NUM_SCHED) n_quad++;
    if (iss > NUM_SCHED) begin
      failures++;
      $display("FAIL: %0d issues in one cycle", iss);
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [];

  task automatic run_kernel(int unsigned nw);
    int unsigned t0;
    gw_ref_warp ref_w;
    @(negedge clk);
    nwarps = (GWID_W+1)'(nw);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = n_cycles;
    repeat (3) @(negedge clk);
    while (!idle) @(negedge clk);
    repeat (4) @(negedge clk);
    $display("kernel with %0d warps finished in %0d cycles", nw, n_cycles - t0);
    for (int g = 0; g < int'(nw); g++) begin
      ref_w = new(g);
      void'(ref_w.run(prog));
      dbg_gwid = GWID_W'(g);
      for (int r = 0; r < NUM_REGS; r++) begin
        if (ref_w.vw[r]) begin
          dbg_reg = '{scalar: 1'b0, idx: 4'(r)};
          #1;
          for (int l = 0; l < WARP_WIDTH; l++) begin
            checks++;
            if (dbg_data[l] !== ref_w.vr[r][l]) begin
              failures++;
              if (failures < 20)
                $display("FAIL: warp %0d v%0d lane %0d = %0d, expected %0d", g, r, l,
                         dbg_data[l], ref_w.vr[r][l]);
            end
          end
        end
        if (ref_w.sw[r]) begin
          dbg_reg = '{scalar: 1'b1, idx: 4'(r)};
          #1;
          checks++;
          if (dbg_data[0] !== ref_w.sr[r]) begin
            failures++;
            if (failures < 20)
              $display("FAIL: warp %0d s%0d = %0d, expected %0d", g, r, dbg_data[0], ref_w.sr[r]);
          end
        end
      end
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-40s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", what);
    end
  endtask

  initial begin
    start = 1'b0; nwarps = '0; dbg_gwid = '0; dbg_reg = '0;
    kernel(prog);
    u_ic.load(prog);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_kernel(NUM_WARPS);
    run_kernel(21);
    $display("instructions executed per warp-thread group: %0d, fetches: %0d", n_issued_instr, n_fetch);
    need("paired issue (16 lanes)", n_pair);
    need("single warp issue (8 lanes)", n_single);
    need("scalar-wave issue", n_wave);
    need("scalar-wave packing > 1 scalar", n_packed);
    need("scoreboard hazard stall", n_hazard);
    need("instruction storage hit (reuse)", n_hit);
    need("instruction storage miss", n_miss);
    need("new instruction fetch", n_fetch);
    need("fetch joined while in flight", n_join);
    need("insert held, set fully referenced", n_stall);
    need("SWST full, scalar waits", n_swfull);
    need("cycle with 4 issues", n_quad);
    // reuse: far fewer fetches than instructions issued
    checks++;
    if (n_fetch * 4 > n_issued_instr) begin
      failures++;
      $display("FAIL: little reuse, %0d fetches for %0d warp instructions", n_fetch, n_issued_instr);
    end
    $display("largest scalar-wave: %0d scalars", max_wave);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
