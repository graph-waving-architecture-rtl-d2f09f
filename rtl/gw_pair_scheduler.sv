// gw_pair_scheduler: clustered-issue scheduler of one 16-lane SIMD unit.
//
// The scheduler owns 8 warp pairs; pair k is even warp 2k and odd warp 2k+1.
// Each cycle it issues one of, in this order:
//   1. a pair whose two warps are both ready and at the same PC (16 lanes),
//   2. the ready part of a pair (8 lanes, other half idle), which also covers
//      a pair whose warps are both ready but have split to different PCs,
//   3. when no warp is ready, the oldest scalar-wave from the SWFU.
// Steps 1 and 2 are round-robin over the pairs. A pair split to different
// PCs issues its even and odd warp in turn. "Ready" means a valid, non-scalar
// instruction with no register hazard and no scalar-wave membership.
//
// Interface: ready/pc per warp and sw_avail in; kind, pair index, half
// enables (bit 0 even, bit 1 odd) and sw_issue out, all combinational.
module gw_pair_scheduler
  import gw_pkg::*;
#(
  parameter int unsigned NWS = WARPS_PER_SCHED,
  localparam int unsigned NP = NWS / 2,
  localparam int unsigned PW = $clog2(NP)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NWS-1:0] ready,
  input  pc_t            pc [NWS],
  input  logic           sw_avail,
  output iss_kind_e      kind,
  output logic [PW-1:0]  pair,
  output logic [1:0]     half,
  output logic           sw_issue
);

  logic [NP-1:0] full, any;
  always_comb
    for (int k = 0; k < NP; k++) begin
      full[k] = ready[2*k] && ready[2*k+1] && pc[2*k] == pc[2*k+1];
      any[k]  = ready[2*k] || ready[2*k+1];
    end

  logic          fv, av;
  logic [PW-1:0] fi, ai;
  logic          take_full, take_any;

  gw_rr_arbiter #(.N(NP)) u_full (.clk, .rst_n, .req(full), .adv(take_full), .gnt_valid(fv), .gnt_idx(fi));
  gw_rr_arbiter #(.N(NP)) u_any  (.clk, .rst_n, .req(any),  .adv(take_any),  .gnt_valid(av), .gnt_idx(ai));

  logic odd_turn_q;   // which half goes first when a split pair has both ready

  always_comb begin
    kind      = ISS_NONE;
    pair      = '0;
    half      = 2'b00;
    sw_issue  = 1'b0;
    take_full = 1'b0;
    take_any  = 1'b0;
    if (fv) begin
      kind = ISS_PAIR; pair = fi; half = 2'b11; take_full = 1'b1;
    end else if (av) begin
      kind = ISS_SINGLE; pair = ai; take_any = 1'b1;
      if (ready[2*ai] && ready[2*ai+1]) half = odd_turn_q ? 2'b10 : 2'b01;
      else                              half = ready[2*ai] ? 2'b01 : 2'b10;
    end else if (sw_avail) begin
      kind = ISS_WAVE; sw_issue = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) odd_turn_q <= 1'b0;
    else if (kind == ISS_SINGLE && ready[2*ai] && ready[2*ai+1]) odd_turn_q <= !odd_turn_q;

  always_ff @(posedge clk)
    if (rst_n) assert (!(kind == ISS_WAVE && |ready)) else $error("wave issued while a warp was ready");

endmodule
