// tb_gw_fetch_unit: checks fetch arbitration, fetch buffers and the fill of
// Instruction Storage.
//
// Random warps raise ReadyToFetch with random PCs; like the Warp Status
// Table, a warp leaves ReadyToFetch when a fetch broadcast covers its block.
// The instruction cache is a behavioural model with random latency, random
// back-pressure and out-of-order answers; Instruction Storage accepts inserts
// at random. Checks: a broadcast block belongs to a ReadyToFetch warp; no
// block is requested twice while in flight (a block being inserted in the
// same cycle may be requested again) and no more than NBUF are in
// flight; a fetch is made in every cycle with a ReadyToFetch warp, a free
// buffer and a ready cache; inserts carry the block's two words decoded
// (opcode, scalar flag, immediate checked against the raw words); every
// request is filled once; no warp waits in ReadyToFetch for long.
module tb_gw_fetch_unit;
  import gw_pkg::*;

  localparam int unsigned NW = NUM_WARPS, NBUF = 2, BW = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NW-1:0] rtf;
  pc_t           warp_pc [NW];
  logic          fq_valid, fq_new, ic_req_valid, ic_req_ready, ic_rsp_valid, ins_valid, ins_ready, fill_valid;
  pc_t           fq_pc, ic_req_pc, ins_pc, fill_pc;
  logic [BW-1:0] ic_req_tag, ic_rsp_tag;
  logic [31:0]   ic_rsp_data [2];
  dinst_t        ins_inst [2];
  logic [1:0]    ins_scalar;

  gw_fetch_unit #(.NW(NW), .NBUF(NBUF)) dut (.*);

  gw_icache_model #(.BW(BW), .MAXLAT(6)) u_ic (
    .clk, .rst_n, .req_valid(ic_req_valid), .req_pc(ic_req_pc), .req_tag(ic_req_tag),
    .req_ready(ic_req_ready), .rsp_valid(ic_rsp_valid), .rsp_tag(ic_rsp_tag), .rsp_data(ic_rsp_data)
  );

  logic [31:0] prog [];
  logic [31:0] img [1 << PC_W];
  int          wait_cyc [NW];
  logic [NW-1:0] clr;
  int          inflight [$];     // requested blocks not yet filled

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

  int n_req = 0, n_fill = 0, n_join = 0, n_full = 0, n_stall = 0, max_wait = 0;

  initial begin
    prog = new[1 << PC_W];
    foreach (prog[i]) begin prog[i] = $urandom; img[i] = prog[i]; end
    u_ic.load(prog);
    rtf = 0; ins_ready = 0;
    foreach (warp_pc[w]) begin warp_pc[w] = 0; wait_cyc[w] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    clr = 0;
    for (int n = 0; n < 8000; n++) begin
      bit owner;
      @(negedge clk);
      rtf &= ~clr;
      // new ReadyToFetch warps (PCs from a small range so blocks are shared)
      if (n < 7600)
        for (int w = 0; w < NW; w++)
          if (!rtf[w] && $urandom_range(0, 40) == 0) begin
            rtf[w] = 1; warp_pc[w] = pc_t'($urandom_range(0, 63)); wait_cyc[w] = 0;
          end
      ins_ready = ($urandom_range(0, 3) != 0);
      #1;
      // fetch broadcast
      if (fq_valid) begin
        owner = 0;
        foreach (warp_pc[w]) if (rtf[w] && warp_pc[w][PC_W-1:1] == fq_pc[PC_W-1:1]) owner = 1;
        checks++;
        if (!owner || fq_pc[0]) fail("broadcast block has no ReadyToFetch warp");
      end
      checks++;
      if (|rtf && inflight.size() < NBUF && ic_req_ready && !fq_valid) fail("no fetch although a buffer is free");
      if (|rtf && inflight.size() == NBUF) n_full++;
      if (ic_req_valid) begin
        checks++;
        foreach (inflight[i]) if (inflight[i] == int'(ic_req_pc) && !(fill_valid && fill_pc == ic_req_pc)) fail("block requested twice");
        if (inflight.size() >= NBUF) fail("more requests than buffers");
        if (ic_req_ready && (ic_req_pc !== fq_pc || !fq_valid)) fail("request without broadcast");
        if (ic_req_ready) begin inflight.push_back(int'(ic_req_pc)); n_req++; end
      end
      if (fq_valid && !fq_new) n_join++;
      // inserts
      checks++;
      if (fill_valid !== (ins_valid && ins_ready) || (fill_valid && fill_pc !== ins_pc)) fail("fill handshake");
      if (ins_valid && !ins_ready) n_stall++;
      if (fill_valid) begin
        int k[$];
        k = inflight.find_first_index(x) with (x == int'(ins_pc));
        checks++;
        if (k.size() == 0) fail("insert of a block not requested");
        else inflight.delete(k[0]);
        for (int j = 0; j < 2; j++) begin
          logic [31:0] word;
          word = img[ins_pc + pc_t'(j)];
          checks++;
          if (ins_scalar[j] !== word[31] || ins_inst[j].op !== opcode_e'(word[30:27]) || ins_inst[j].imm !== word[11:0])
            fail($sformatf("decoded word %0d of block %0d", j, ins_pc));
        end
        n_fill++;
      end
      // warps covered by the broadcast leave ReadyToFetch after the clock edge
      clr = 0;
      for (int w = 0; w < NW; w++)
        if (rtf[w]) begin
          if (fq_valid && warp_pc[w][PC_W-1:1] == fq_pc[PC_W-1:1]) clr[w] = 1;
          else begin
            wait_cyc[w]++;
            if (wait_cyc[w] > max_wait) max_wait = wait_cyc[w];
          end
        end
    end
    // drain
    repeat (40) begin
      @(negedge clk);
      ins_ready = 1;
      #1;
      if (fill_valid) begin
        int k[$];
        k = inflight.find_first_index(x) with (x == int'(ins_pc));
        if (k.size() > 0) inflight.delete(k[0]);
        n_fill++;
      end
    end
    checks++;
    if (inflight.size() != 0 || n_fill != n_req) fail($sformatf("%0d requests, %0d fills", n_req, n_fill));
    checks++;
    if (max_wait > 4 * NW) fail($sformatf("a warp waited %0d cycles to be fetched", max_wait));
    checks++;
    if (n_req == 0 || n_join == 0 || n_full == 0 || n_stall == 0) fail("a case was not reached");
    $display("requests=%0d fills=%0d joined=%0d buffers-full=%0d insert-stalls=%0d max-wait=%0d",
             n_req, n_fill, n_join, n_full, n_stall, max_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
