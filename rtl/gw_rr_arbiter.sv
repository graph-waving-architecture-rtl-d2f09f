// gw_rr_arbiter: round-robin arbiter used by the fetch unit, the warp status
// table and the scheduler.
//
// Combinational grant among req bits, starting the search one past the last
// granted index; the pointer moves only when adv is high and a grant was made,
// so a caller that cannot use the grant keeps its turn. Generic helper.
//
// Interface: req[N] -> gnt_valid, gnt_idx. Pointer updates at clk when adv.
module gw_rr_arbiter #(
  parameter int unsigned N = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          adv,
  output logic          gnt_valid,
  output logic [IW-1:0] gnt_idx
);

  logic [IW-1:0] last_q;

  always_comb begin
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int k = 1; k <= N; k++) begin
      int unsigned i;
      i = (int'(last_q) + k) % N;
      if (!gnt_valid && req[i]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                last_q <= IW'(N - 1);
    else if (adv && gnt_valid) last_q <= gnt_idx;
  end

endmodule
