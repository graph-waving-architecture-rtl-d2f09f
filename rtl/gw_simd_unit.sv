// gw_simd_unit: 16-lane pipelined SP unit of one scheduler.
//
// The 16 lanes run either an even/odd pair of 8-wide warps (lanes 0-7 the
// even warp, 8-15 the odd warp), one warp of a pair (the other half idle) or
// a scalar-wave (lane i computes the scalar of warp i). Lanes that are not
// enabled keep their operand registers unchanged and return zero, which
// models putting the idle part of the unit into an inactive mode.
//
// Timing: operands are registered at the issue clock edge, the result is
// computed from them and passes LAT-1 further register stages, so out_valid
// comes LAT cycles after in_valid. Fully pipelined: one issue per cycle.
// Side information (destination, lanes, wave id) rides along in meta.
// The operation set is this design's own (see gw_pkg).
module gw_simd_unit
  import gw_pkg::*;
#(
  parameter int unsigned LANES = SIMD_WIDTH,
  parameter int unsigned LAT   = 2,
  parameter int unsigned MW    = 32     // width of the side information
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  opcode_e          in_op,
  input  logic [11:0]      in_imm,
  input  logic [LANES-1:0] in_lane_en,
  input  word_t            in_a   [LANES],
  input  word_t            in_b   [LANES],
  input  word_t            in_wid [LANES],   // get_warp_id() of the lane's warp
  input  word_t            in_lid [LANES],   // get_warp_local_id()
  input  logic [MW-1:0]    in_meta,
  output logic             out_valid,
  output word_t            out_res [LANES],
  output logic [LANES-1:0] out_lane_en,
  output logic [MW-1:0]    out_meta
);

  // Operand stage
  logic             v0_q;
  opcode_e          op0_q;
  logic [11:0]      imm0_q;
  logic [LANES-1:0] en0_q;
  word_t            a0_q [LANES], b0_q [LANES], w0_q [LANES], l0_q [LANES];
  logic [MW-1:0]    m0_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0_q <= 1'b0; op0_q <= OP_NOP; imm0_q <= '0; en0_q <= '0; m0_q <= '0;
    end else begin
      v0_q <= in_valid;
      if (in_valid) begin
        op0_q <= in_op; imm0_q <= in_imm; en0_q <= in_lane_en; m0_q <= in_meta;
      end
    end
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane_in
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        a0_q[l] <= '0; b0_q[l] <= '0; w0_q[l] <= '0; l0_q[l] <= '0;
      end else if (in_valid && in_lane_en[l]) begin
        a0_q[l] <= in_a[l]; b0_q[l] <= in_b[l]; w0_q[l] <= in_wid[l]; l0_q[l] <= in_lid[l];
      end
  end

  // Lane ALUs
  word_t res [LANES];
  word_t simm;
  assign simm = word_t'(signed'(imm0_q));

  always_comb
    for (int l = 0; l < LANES; l++) begin
      unique case (op0_q)
        OP_ADD:   res[l] = a0_q[l] + b0_q[l];
        OP_SUB:   res[l] = a0_q[l] - b0_q[l];
        OP_MUL:   res[l] = a0_q[l] * b0_q[l];
        OP_AND:   res[l] = a0_q[l] & b0_q[l];
        OP_OR:    res[l] = a0_q[l] | b0_q[l];
        OP_XOR:   res[l] = a0_q[l] ^ b0_q[l];
        OP_SLT:   res[l] = word_t'($signed(a0_q[l]) < $signed(b0_q[l]));
        OP_ADDI:  res[l] = a0_q[l] + simm;
        OP_MOVI:  res[l] = simm;
        OP_WID:   res[l] = w0_q[l];
        OP_LID:   res[l] = l0_q[l];
        OP_SIMDW: res[l] = word_t'(WARP_WIDTH);
        default:  res[l] = '0;
      endcase
      if (!en0_q[l]) res[l] = '0;
    end

  // Result stages
  logic             v_q   [LAT];
  word_t            r_q   [LAT][LANES];
  logic [LANES-1:0] en_q  [LAT];
  logic [MW-1:0]    m_q   [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s < LAT; s++) begin
        v_q[s] <= 1'b0; en_q[s] <= '0; m_q[s] <= '0;
        for (int l = 0; l < LANES; l++) r_q[s][l] <= '0;
      end
    end else begin
      v_q[1] <= v0_q; en_q[1] <= en0_q; m_q[1] <= m0_q;
      for (int l = 0; l < LANES; l++) r_q[1][l] <= res[l];
      for (int s = 2; s < LAT; s++) begin
        v_q[s] <= v_q[s-1]; en_q[s] <= en_q[s-1]; m_q[s] <= m_q[s-1];
        for (int l = 0; l < LANES; l++) r_q[s][l] <= r_q[s-1][l];
      end
    end
  end

  assign out_valid   = v_q[LAT-1];
  assign out_lane_en = en_q[LAT-1];
  assign out_meta    = m_q[LAT-1];
  always_comb for (int l = 0; l < LANES; l++) out_res[l] = r_q[LAT-1][l];

  initial assert (LAT >= 2) else $error("LAT must be at least 2");

endmodule
