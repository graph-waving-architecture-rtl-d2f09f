// tb_gw_simd_unit: checks the 16-lane SP unit.
//
// Issues a random operation with random lane enables every cycle and
// compares each lane's result, the lane enables and the side information
// with a model, LAT cycles later (the stated latency). Disabled lanes must
// return zero.
module tb_gw_simd_unit;
  import gw_pkg::*;

  localparam int unsigned L = 16, LAT = 2, MW = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, out_valid;
  opcode_e in_op;
  logic [11:0] in_imm;
  logic [L-1:0] in_lane_en, out_lane_en;
  word_t in_a [L], in_b [L], in_wid [L], in_lid [L], out_res [L];
  logic [MW-1:0] in_meta, out_meta;

  gw_simd_unit #(.LANES(L), .LAT(LAT), .MW(MW)) dut (.*);

  typedef struct { bit v; word_t r [L]; logic [L-1:0] en; logic [MW-1:0] m; } exp_t;
  exp_t pipe [$];

  function automatic word_t model(opcode_e op, word_t a, word_t b, logic [11:0] imm, word_t w, word_t l);
    word_t si = {{20{imm[11]}}, imm};
    case (op)
      OP_ADD: return a + b;   OP_SUB: return a - b;   OP_MUL: return a * b;
      OP_AND: return a & b;   OP_OR: return a | b;    OP_XOR: return a ^ b;
      OP_SLT: return $signed(a) < $signed(b) ? 1 : 0;
      OP_ADDI: return a + si; OP_MOVI: return si;
      OP_WID: return w;       OP_LID: return l;       OP_SIMDW: return 8;
      default: return 0;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_op = OP_NOP; in_imm = 0; in_lane_en = 0; in_meta = 0;
    foreach (in_a[l]) begin in_a[l] = 0; in_b[l] = 0; in_wid[l] = 0; in_lid[l] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      exp_t e;
      @(negedge clk);
      // check the output due this cycle
      if (pipe.size() == LAT) begin
        e = pipe.pop_front();
        checks++;
        if (out_valid !== e.v) begin failures++; $display("FAIL: valid at %0d", n); end
        if (e.v) begin
          checks++;
          if (out_lane_en !== e.en || out_meta !== e.m) begin failures++; $display("FAIL: meta at %0d", n); end
          for (int l = 0; l < L; l++) begin
            checks++;
            if (out_res[l] !== e.r[l]) begin
              failures++;
              if (failures < 10) $display("FAIL: lane %0d got %h exp %h", l, out_res[l], e.r[l]);
            end
          end
        end
      end
      in_valid   = ($urandom_range(0, 3) != 0);
      in_op      = opcode_e'($urandom_range(0, 15));
      in_imm     = 12'($urandom);
      in_lane_en = 16'($urandom);
      in_meta    = $urandom;
      for (int l = 0; l < L; l++) begin
        in_a[l] = ($urandom_range(0, 1)) ? $urandom : $urandom_range(0, 20);
        in_b[l] = $urandom; in_wid[l] = $urandom_range(0, 63); in_lid[l] = l % 8;
      end
      e.v = in_valid; e.en = in_lane_en; e.m = in_meta;
      for (int l = 0; l < L; l++)
        e.r[l] = in_lane_en[l] ? model(in_op, in_a[l], in_b[l], in_imm, in_wid[l], in_lid[l]) : 0;
      pipe.push_back(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
