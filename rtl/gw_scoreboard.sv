// gw_scoreboard: Scoreboarding unit of one scheduler.
//
// Two tables, as in the architecture: a Warp Scoreboard with two pending
// destination registers (dst #1, dst #2) per warp, and a Scalar-Wave
// Scoreboard with one entry per scalar-wave ID holding the wave's odd-warp
// mask, even-warp mask and destination. An instruction of a warp has a hazard
// when a register it reads or writes is pending for that warp in either
// table, or when it writes and both warp slots are taken.
//
// Interface:
//   chk_inst[w] -> hz[w]        combinational hazard check per warp slot
//   rsv_mask/rsv_dst            reserve dst for the warps issued this cycle
//   wsv/wsv_swid/wsv_mask/...   reserve a scalar-wave entry on wave issue
//   rel_mask/rel_dst            clear warp entries at write-back
//   wrel/wrel_swid              clear a scalar-wave entry at write-back
// Updates happen at the clock edge. Warp w of the scheduler is even warp w/2
// when w is even and odd warp w/2 when w is odd. The wave table keeps one
// destination because every instruction of this instruction set has at most
// one; the second destination column of the architecture is not kept.
module gw_scoreboard
  import gw_pkg::*;
#(
  parameter int unsigned NWS = WARPS_PER_SCHED,
  parameter int unsigned NSW = 4,
  localparam int unsigned SWW = $clog2(NSW)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  dinst_t           chk_inst [NWS],
  output logic [NWS-1:0]   hz,
  input  logic [NWS-1:0]   rsv_mask,
  input  reg_t             rsv_dst,
  input  logic             wsv,
  input  logic [SWW-1:0]   wsv_swid,
  input  logic [NWS-1:0]   wsv_mask,
  input  reg_t             wsv_dst,
  input  logic [NWS-1:0]   rel_mask,
  input  reg_t             rel_dst,
  input  logic             wrel,
  input  logic [SWW-1:0]   wrel_swid
);

  // Warp scoreboard
  logic [1:0] wv_q   [NWS];
  reg_t       wdst_q [NWS][2];
  // Scalar-wave scoreboard
  logic           sv_q   [NSW];
  logic [NWS/2-1:0] odd_q  [NSW];
  logic [NWS/2-1:0] even_q [NSW];
  reg_t           sdst_q [NSW];

  function automatic logic in_wave(int unsigned s, int unsigned w);
    return (w % 2 == 0) ? even_q[s][w/2] : odd_q[s][w/2];
  endfunction

  always_comb begin
    for (int w = 0; w < NWS; w++) begin
      dinst_t     i;
      logic       h;
      i = chk_inst[w];
      h = i.wr && (wv_q[w] == 2'b11);
      for (int k = 0; k < 2; k++)
        if (wv_q[w][k])
          h |= (i.rd1 && i.src1 == wdst_q[w][k]) || (i.rd2 && i.src2 == wdst_q[w][k]) ||
               (i.wr && i.dst == wdst_q[w][k]);
      for (int s = 0; s < NSW; s++)
        if (sv_q[s] && in_wave(s, w))
          h |= (i.rd1 && i.src1 == sdst_q[s]) || (i.rd2 && i.src2 == sdst_q[s]) ||
               (i.wr && i.dst == sdst_q[s]);
      hz[w] = h;
    end
  end

  // Next state of the warp entries: release first, then reserve.
  logic [1:0] wv_d   [NWS];
  reg_t       wdst_d [NWS][2];
  always_comb
    for (int w = 0; w < NWS; w++) begin
      wv_d[w]      = wv_q[w];
      wdst_d[w][0] = wdst_q[w][0];
      wdst_d[w][1] = wdst_q[w][1];
      if (rel_mask[w]) begin
        if (wv_d[w][0] && wdst_q[w][0] == rel_dst) wv_d[w][0] = 1'b0;
        else if (wv_d[w][1] && wdst_q[w][1] == rel_dst) wv_d[w][1] = 1'b0;
      end
      if (rsv_mask[w]) begin
        if (!wv_d[w][0]) begin wv_d[w][0] = 1'b1; wdst_d[w][0] = rsv_dst; end
        else if (!wv_d[w][1]) begin wv_d[w][1] = 1'b1; wdst_d[w][1] = rsv_dst; end
      end
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < NWS; w++) begin
        wv_q[w] <= '0;
        wdst_q[w][0] <= '0;
        wdst_q[w][1] <= '0;
      end
      for (int s = 0; s < NSW; s++) begin
        sv_q[s] <= 1'b0;
        odd_q[s] <= '0;
        even_q[s] <= '0;
        sdst_q[s] <= '0;
      end
    end else begin
      for (int w = 0; w < NWS; w++) begin
        wv_q[w]      <= wv_d[w];
        wdst_q[w][0] <= wdst_d[w][0];
        wdst_q[w][1] <= wdst_d[w][1];
      end
      if (wrel) sv_q[wrel_swid] <= 1'b0;
      if (wsv) begin
        sv_q[wsv_swid]   <= 1'b1;
        sdst_q[wsv_swid] <= wsv_dst;
        for (int k = 0; k < NWS / 2; k++) begin
          even_q[wsv_swid][k] <= wsv_mask[2*k];
          odd_q[wsv_swid][k]  <= wsv_mask[2*k+1];
        end
      end
    end
  end

  always_ff @(posedge clk)
    if (rst_n) begin
      for (int w = 0; w < NWS; w++)
        assert (!(rsv_mask[w] && wv_q[w] == 2'b11 && !rel_mask[w]))
          else $error("warp %0d reserved a third destination", w);
      assert (!(wsv && sv_q[wsv_swid] && !(wrel && wrel_swid == wsv_swid)))
        else $error("scalar-wave scoreboard entry %0d reserved twice", wsv_swid);
    end

endmodule
