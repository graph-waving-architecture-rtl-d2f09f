// tb_gw_pair_scheduler: checks the clustered-issue scheduler.
//
// Random ready masks and PCs (few distinct PCs, so pairs often match) are
// applied each cycle. The checks follow the issue rules: a full pair (both
// ready, same PC) is issued whenever one exists; otherwise a single ready
// half of some pair; a scalar-wave only when no warp is ready; nothing when
// nothing is available. The issued warps must be ready, and over time every
// pair with a ready warp must be served (round-robin fairness).
module tb_gw_pair_scheduler;
  import gw_pkg::*;

  localparam int unsigned NWS = 16, NP = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NWS-1:0] ready;
  pc_t            pc [NWS];
  logic           sw_avail, sw_issue;
  iss_kind_e      kind;
  logic [2:0]     pair;
  logic [1:0]     half;

  gw_pair_scheduler #(.NWS(NWS)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("FAIL: %s (ready=%b kind=%0d pair=%0d half=%b)", m, ready, kind, pair, half);
  endtask

  int served [NP];
  int n_kind [4];

  initial begin
    ready = 0; sw_avail = 0;
    foreach (pc[w]) pc[w] = 0;
    foreach (served[k]) served[k] = 0;
    foreach (n_kind[k]) n_kind[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      bit any_full, any_ready;
      @(negedge clk);
      ready    = ($urandom_range(0, 4) == 0) ? '0 : 16'($urandom & $urandom);
      sw_avail = $urandom_range(0, 1);
      foreach (pc[w]) pc[w] = pc_t'($urandom_range(0, 2));
      #1;
      any_full = 0;
      for (int k = 0; k < NP; k++)
        if (ready[2*k] && ready[2*k+1] && pc[2*k] == pc[2*k+1]) any_full = 1;
      any_ready = |ready;
      n_kind[kind]++;
      checks++;
      if (any_full) begin
        if (kind != ISS_PAIR || half != 2'b11) fail("full pair available but not issued");
        else if (!(ready[2*pair] && ready[2*pair+1] && pc[2*pair] == pc[2*pair+1])) fail("pair not full");
      end else if (any_ready) begin
        if (kind != ISS_SINGLE) fail("single expected");
        else if (!(half == 2'b01 && ready[2*pair]) && !(half == 2'b10 && ready[2*pair+1]))
          fail("issued half not ready");
      end else if (sw_avail) begin
        if (kind != ISS_WAVE || !sw_issue) fail("wave expected");
      end else if (kind != ISS_NONE) fail("issue with nothing ready");
      checks++;
      if (sw_issue != (kind == ISS_WAVE)) fail("sw_issue mismatch");
      if (kind == ISS_PAIR || kind == ISS_SINGLE) served[pair]++;
    end
    // fairness: every pair served
    for (int k = 0; k < NP; k++) begin
      checks++;
      if (served[k] < 100) fail($sformatf("pair %0d served only %0d times", k, served[k]));
    end
    $display("none=%0d pair=%0d single=%0d wave=%0d", n_kind[0], n_kind[1], n_kind[2], n_kind[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
