// gw_tb_pkg: testbench helpers for the GW core.
//
// enc() builds instruction words in the format of gw_pkg. The class
// gw_ref_warp is an independent, sequential model of one warp running a
// program: it gives the register state the core must end with, whatever
// order the hardware issues in (warps share no state in this instruction
// set). kernel() builds the end-to-end test program.
package gw_tb_pkg;
  import gw_pkg::*;

  function automatic logic [31:0] enc(bit s, opcode_e op, bit ds, int d, bit as, int a,
                                      bit bs, int b, int imm);
    logic [31:0] w;
    w = '0;
    w[31]    = s;
    w[30:27] = op;
    w[26:22] = {ds, 4'(d)};
    w[21:17] = {as, 4'(a)};
    w[16:12] = {bs, 4'(b)};
    w[11:0]  = 12'(imm);
    return w;
  endfunction

  // Shorthands: V = vector register, S = scalar register.
  localparam bit V = 1'b0;
  localparam bit S = 1'b1;

  class gw_ref_warp;
    int unsigned gwid;
    logic [31:0] vr [NUM_REGS][WARP_WIDTH];
    logic [31:0] sr [NUM_REGS];
    bit          vw [NUM_REGS];   // register written
    bit          sw [NUM_REGS];
    int unsigned steps;

    function new(int unsigned id);
      gwid = id;
      foreach (vw[i]) begin vw[i] = 0; sw[i] = 0; end
      foreach (sr[i]) sr[i] = 0;
      foreach (vr[i, j]) vr[i][j] = 0;
      steps = 0;
    endfunction

    function logic [31:0] src(logic [4:0] r, int lane);
      return r[4] ? sr[r[3:0]] : vr[r[3:0]][lane];
    endfunction

    function logic [31:0] alu(opcode_e op, logic [31:0] a, logic [31:0] b, logic [11:0] imm,
                              int lid);
      logic [31:0] si;
      si = {{20{imm[11]}}, imm};
      case (op)
        OP_ADD:   return a + b;
        OP_SUB:   return a - b;
        OP_MUL:   return a * b;
        OP_AND:   return a & b;
        OP_OR:    return a | b;
        OP_XOR:   return a ^ b;
        OP_SLT:   return ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
        OP_ADDI:  return a + si;
        OP_MOVI:  return si;
        OP_WID:   return gwid;
        OP_LID:   return 32'(lid);
        OP_SIMDW: return 32'(WARP_WIDTH);
        default:  return '0;
      endcase
    endfunction

    // Runs the program from PC 0 to EXIT. Returns the number of instructions.
    function int unsigned run(logic [31:0] prog []);
      int unsigned pc;
      pc = 0;
      while (steps < 100000) begin
        logic [31:0] w;
        opcode_e op;
        bit s;
        logic [4:0] d, a, b;
        logic [31:0] res [WARP_WIDTH];
        w  = prog[pc];
        s  = w[31];
        op = opcode_e'(w[30:27]);
        d  = w[26:22]; a = w[21:17]; b = w[16:12];
        steps++;
        if (op == OP_EXIT) break;
        if (op == OP_BNZ || op == OP_BZ) begin
          logic [31:0] c;
          c = src(a, 0);
          if ((op == OP_BNZ) == (c != 0)) pc = w[PC_W-1:0];
          else pc = pc + 1;
          continue;
        end
        if (op != OP_NOP) begin
          if (s) begin
            logic [31:0] r;
            r = alu(op, src(a, 0), src(b, 0), w[11:0], 0);
            for (int l = 0; l < WARP_WIDTH; l++) res[l] = r;
          end else
            for (int l = 0; l < WARP_WIDTH; l++)
              res[l] = alu(op, src(a, l), src(b, l), w[11:0], l);
          if (d[4]) begin sr[d[3:0]] = res[0]; sw[d[3:0]] = 1; end
          else begin
            for (int l = 0; l < WARP_WIDTH; l++) vr[d[3:0]][l] = res[l];
            vw[d[3:0]] = 1;
          end
        end
        pc = pc + 1;
      end
      return steps;
    endfunction
  endclass

  // End-to-end kernel, shaped like the scalarized edge-list expansion loop:
  // warp-uniform (scalar) setup of the vertex's edge range, a loop whose
  // lanes each take one edge per iteration, then a branch on the warp id to
  // one of four code regions that share one Instruction Storage set, and a
  // common tail. Returns a 1024-word program, unused words are NOP.
  function automatic void kernel(ref logic [31:0] prog []);
    prog = new[1 << PC_W];
    foreach (prog[i]) prog[i] = '0;
    prog[0]  = enc(1, OP_WID,  S, 0, S, 0, S, 0, 0);     // s0 = vertex = warp id
    prog[1]  = enc(1, OP_MOVI, S, 6, S, 0, S, 0, 5);
    prog[2]  = enc(1, OP_MUL,  S, 1, S, 0, S, 6, 0);
    prog[3]  = enc(1, OP_ADDI, S, 1, S, 1, S, 0, 3);
    prog[4]  = enc(1, OP_MOVI, S, 7, S, 0, S, 0, 15);
    prog[5]  = enc(1, OP_AND,  S, 1, S, 1, S, 7, 0);     // s1 = degree 0..15
    prog[6]  = enc(1, OP_MOVI, S, 8, S, 0, S, 0, 16);
    prog[7]  = enc(1, OP_MUL,  S, 2, S, 0, S, 8, 0);     // s2 = start
    prog[8]  = enc(1, OP_ADD,  S, 3, S, 2, S, 1, 0);     // s3 = end
    prog[9]  = enc(0, OP_LID,  V, 0, V, 0, V, 0, 0);     // v0 = local id
    prog[10] = enc(0, OP_ADD,  V, 1, V, 0, S, 2, 0);     // v1 = e = start + lid
    prog[11] = enc(0, OP_MOVI, V, 3, V, 0, V, 0, 0);     // v3 = edges taken
    prog[12] = enc(0, OP_SIMDW,V, 4, V, 0, V, 0, 0);     // v4 = simd width
    prog[13] = enc(1, OP_MOVI, S, 4, S, 0, S, 0, 0);     // s4 = loop offset
    // loop
    prog[14] = enc(0, OP_SLT,  V, 2, V, 1, S, 3, 0);     // e < end
    prog[15] = enc(0, OP_ADD,  V, 3, V, 3, V, 2, 0);
    prog[16] = enc(0, OP_ADD,  V, 1, V, 1, V, 4, 0);     // e += simd width
    prog[17] = enc(1, OP_ADDI, S, 4, S, 4, S, 0, 8);
    prog[18] = enc(1, OP_SLT,  S, 5, S, 4, S, 1, 0);
    prog[19] = enc(1, OP_BNZ,  S, 0, S, 5, S, 0, 14);
    // dispatch on warp id & 3
    prog[20] = enc(0, OP_WID,  V, 5, V, 0, V, 0, 0);
    prog[21] = enc(0, OP_MOVI, V, 6, V, 0, V, 0, 3);
    prog[22] = enc(0, OP_AND,  V, 7, V, 5, V, 6, 0);
    prog[23] = enc(0, OP_BZ,   V, 0, V, 7, V, 0, 'h40);
    prog[24] = enc(0, OP_ADDI, V, 8, V, 7, V, 0, -1);
    prog[25] = enc(0, OP_BZ,   V, 0, V, 8, V, 0, 'h60);
    prog[26] = enc(0, OP_ADDI, V, 8, V, 7, V, 0, -2);
    prog[27] = enc(0, OP_BZ,   V, 0, V, 8, V, 0, 'h80);
    prog[28] = enc(0, OP_BNZ,  V, 0, V, 7, V, 0, 'hA0);
    for (int k = 0; k < 4; k++) begin
      int b;
      b = 'h40 + 'h20 * k;
      prog[b+0] = enc(0, OP_ADDI, V, 9,  V, 3, V, 0, 10 * k + 1);
      prog[b+1] = enc(0, OP_MUL,  V, 9,  V, 9, V, 9, 0);
      prog[b+2] = enc(0, OP_ADD,  V, 10, V, 9, V, 0, 0);
      prog[b+3] = enc(1, OP_ADDI, S, 9,  S, 1, S, 0, k);
      prog[b+4] = enc(0, OP_ADD,  V, 11, V, 10, S, 9, 0);
      prog[b+5] = enc(1, OP_MOVI, S, 10, S, 0, S, 0, 0);
      prog[b+6] = enc(1, OP_BZ,   S, 0, S, 10, S, 0, 'hC0);
    end
    prog['hC0] = enc(1, OP_ADD,  S, 11, S, 3, S, 1, 0);
    prog['hC1] = enc(0, OP_ADD,  V, 12, V, 11, S, 11, 0);
    prog['hC2] = enc(0, OP_EXIT, V, 0, V, 0, V, 0, 0);
  endfunction

endpackage
