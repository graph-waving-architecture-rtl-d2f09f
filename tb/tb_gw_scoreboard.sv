// tb_gw_scoreboard: checks the warp and scalar-wave scoreboards.
//
// Random reservations (warp instructions and scalar-waves) and releases are
// applied while a model keeps, per warp, the list of pending destinations
// (from its own instructions and from waves it belongs to). Every cycle the
// hazard output of each warp is compared with the model for a random
// instruction, including the "both destination slots taken" stall.
module tb_gw_scoreboard;
  import gw_pkg::*;

  localparam int unsigned NWS = 16, NSW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  dinst_t         chk_inst [NWS];
  logic [NWS-1:0] hz, rsv_mask, wsv_mask, rel_mask;
  reg_t           rsv_dst, wsv_dst, rel_dst;
  logic           wsv, wrel;
  logic [1:0]     wsv_swid, wrel_swid;

  gw_scoreboard #(.NWS(NWS), .NSW(NSW)) dut (.*);

  reg_t wp [NWS][$];            // pending warp destinations
  bit   sv [NSW];
  logic [NWS-1:0] sm [NSW];
  reg_t sd [NSW];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit model_hz(int w, dinst_t i);
    bit h;
    h = i.wr && wp[w].size() == 2;
    foreach (wp[w][k])
      h |= (i.rd1 && i.src1 == wp[w][k]) || (i.rd2 && i.src2 == wp[w][k]) || (i.wr && i.dst == wp[w][k]);
    for (int s = 0; s < NSW; s++)
      if (sv[s] && sm[s][w])
        h |= (i.rd1 && i.src1 == sd[s]) || (i.rd2 && i.src2 == sd[s]) || (i.wr && i.dst == sd[s]);
    return h;
  endfunction

  function automatic reg_t rreg();
    return reg_t'($urandom_range(0, 5) | ($urandom_range(0, 1) << 4));
  endfunction

  int n_hz = 0;

  initial begin
    rsv_mask = 0; wsv = 0; wrel = 0; rel_mask = 0; wsv_mask = 0;
    rsv_dst = '0; wsv_dst = '0; rel_dst = '0; wsv_swid = 0; wrel_swid = 0;
    foreach (chk_inst[w]) chk_inst[w] = '0;
    foreach (sv[s]) begin sv[s] = 0; sm[s] = 0; sd[s] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      rsv_mask = 0; wsv = 0; wrel = 0; rel_mask = 0;
      foreach (chk_inst[w]) begin
        chk_inst[w] = '0;
        chk_inst[w].src1 = rreg(); chk_inst[w].src2 = rreg(); chk_inst[w].dst = rreg();
        chk_inst[w].rd1 = $urandom_range(0, 1); chk_inst[w].rd2 = $urandom_range(0, 1);
        chk_inst[w].wr = $urandom_range(0, 1);
      end
      #1;
      for (int w = 0; w < NWS; w++) begin
        checks++;
        n_hz += hz[w];
        if (hz[w] !== model_hz(w, chk_inst[w])) begin
          failures++;
          if (failures < 10) $display("FAIL: warp %0d hazard %0b expected %0b", w, hz[w], model_hz(w, chk_inst[w]));
        end
      end
      // release one pending warp destination (same dst in several warps)
      if ($urandom_range(0, 1)) begin
        int w0;
        w0 = $urandom_range(0, NWS - 1);
        if (wp[w0].size() > 0) begin
          rel_dst = wp[w0][$urandom_range(0, wp[w0].size() - 1)];
          for (int w = 0; w < NWS; w++)
            foreach (wp[w][k]) if (wp[w][k] == rel_dst && $urandom_range(0, 1)) begin
              rel_mask[w] = 1; wp[w].delete(k); break;
            end
          if (rel_mask == 0) begin rel_mask[w0] = 1; foreach (wp[w0][k]) if (wp[w0][k] == rel_dst) begin wp[w0].delete(k); break; end end
        end
      end
      // reserve for warps with a free slot (after the release)
      if ($urandom_range(0, 1)) begin
        rsv_dst = rreg();
        for (int w = 0; w < NWS; w++)
          if ($urandom_range(0, 3) == 0 && wp[w].size() < 2) begin
            bit dup = 0;
            foreach (wp[w][k]) if (wp[w][k] == rsv_dst) dup = 1;
            if (!dup) begin rsv_mask[w] = 1; wp[w].push_back(rsv_dst); end
          end
      end
      // waves
      if ($urandom_range(0, 2) == 0) begin
        int s;
        s = $urandom_range(0, NSW - 1);
        if (sv[s]) begin wrel = 1; wrel_swid = 2'(s); sv[s] = 0; end
        else begin
          wsv = 1; wsv_swid = 2'(s); wsv_mask = 16'($urandom); wsv_dst = rreg();
          sv[s] = 1; sm[s] = wsv_mask; sd[s] = wsv_dst;
        end
      end
    end
    checks++;
    if (n_hz == 0) begin failures++; $display("FAIL: no hazard seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
