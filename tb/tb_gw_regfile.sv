// tb_gw_regfile: checks the vector and grouped scalar register file.
//
// Random writes of every issue kind (pair, single, scalar-wave; vector or
// scalar destination) are mirrored in a model of per-warp vector registers
// and per-warp scalars. After each write, random reads of every kind are
// compared lane by lane with the model, and the debug port is checked.
// Only registers written since reset are read.
module tb_gw_regfile;
  import gw_pkg::*;

  localparam int unsigned NWS = 16, L = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  iss_kind_e  rd_kind, wr_kind;
  logic [2:0] rd_pair, wr_pair;
  reg_t       rd_src1, rd_src2, wr_dst, dbg_reg;
  word_t      rd_a [L], rd_b [L], wr_data [L], dbg_data [8];
  logic       wr_valid;
  logic [NWS-1:0] wr_lanes;
  logic [3:0] dbg_slot;

  gw_regfile #(.NWS(NWS)) dut (.*);

  word_t mv [NWS][NUM_REGS][8];
  word_t ms [NUM_REGS][NWS];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t exp_rd(iss_kind_e k, int p, reg_t r, int l);
    int w;
    if (k == ISS_WAVE) return r.scalar ? ms[r.idx][l] : mv[l][r.idx][0];
    w = 2 * p + l / 8;
    return r.scalar ? ms[r.idx][w] : mv[w][r.idx][l % 8];
  endfunction

  initial begin
    wr_valid = 0; rd_kind = ISS_PAIR; rd_pair = 0; rd_src1 = '0; rd_src2 = '0;
    wr_kind = ISS_PAIR; wr_pair = 0; wr_dst = '0; wr_lanes = 0; dbg_slot = 0; dbg_reg = '0;
    foreach (wr_data[l]) wr_data[l] = 0;
    // initialise every register through the write port
    for (int w = 0; w < NWS; w += 2)
      for (int r = 0; r < NUM_REGS; r++)
        for (int s = 0; s < 2; s++) begin
          @(negedge clk);
          wr_valid = 1; wr_kind = ISS_PAIR; wr_pair = 3'(w / 2); wr_lanes = '1;
          wr_dst = '{scalar: 1'(s), idx: 4'(r)};
          foreach (wr_data[l]) wr_data[l] = $urandom;
          for (int l = 0; l < L; l++)
            if (s) ms[r][w + l / 8] = wr_data[(l / 8) * 8];
            else mv[w + l / 8][r][l % 8] = wr_data[l];
        end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      wr_valid = 1;
      wr_kind  = iss_kind_e'($urandom_range(1, 3));
      wr_pair  = 3'($urandom);
      wr_dst   = reg_t'($urandom);
      foreach (wr_data[l]) wr_data[l] = $urandom;
      if (wr_kind == ISS_WAVE) wr_lanes = 16'($urandom);
      else if (wr_kind == ISS_PAIR) wr_lanes = '1;
      else wr_lanes = $urandom_range(0, 1) ? 16'h00FF : 16'hFF00;
      // model
      if (wr_kind == ISS_WAVE) begin
        for (int w = 0; w < NWS; w++)
          if (wr_lanes[w]) begin
            if (wr_dst.scalar) ms[wr_dst.idx][w] = wr_data[w];
            else for (int j = 0; j < 8; j++) mv[w][wr_dst.idx][j] = wr_data[w];
          end
      end else
        for (int h = 0; h < 2; h++)
          if (wr_lanes[h*8]) begin
            if (wr_dst.scalar) ms[wr_dst.idx][2*wr_pair+h] = wr_data[h*8];
            else for (int j = 0; j < 8; j++) mv[2*wr_pair+h][wr_dst.idx][j] = wr_data[h*8+j];
          end
      @(negedge clk);
      wr_valid = 0;
      for (int k = 0; k < 4; k++) begin
        rd_kind = iss_kind_e'($urandom_range(1, 3));
        rd_pair = 3'($urandom);
        rd_src1 = reg_t'($urandom);
        rd_src2 = reg_t'($urandom);
        dbg_slot = 4'($urandom);
        dbg_reg = reg_t'($urandom);
        #1;
        for (int l = 0; l < L; l++) begin
          checks++;
          if (rd_a[l] !== exp_rd(rd_kind, rd_pair, rd_src1, l) || rd_b[l] !== exp_rd(rd_kind, rd_pair, rd_src2, l)) begin
            failures++;
            if (failures < 10) $display("FAIL: kind %0d pair %0d lane %0d", rd_kind, rd_pair, l);
          end
        end
        for (int j = 0; j < 8; j++) begin
          checks++;
          if (dbg_data[j] !== (dbg_reg.scalar ? ms[dbg_reg.idx][dbg_slot] : mv[dbg_slot][dbg_reg.idx][j])) begin
            failures++;
            if (failures < 10) $display("FAIL: debug read");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
