// gw_regfile: register file of one scheduler, vector and grouped scalar part.
//
// Vector part: per warp, NUM_REGS registers of 8 lanes. Scalar part: each
// scalar register entry holds one value for each of the scheduler's 16
// warps, so one access by a scalar-wave delivers the operands of every warp
// of the wave. A register operand's tag bit selects the scalar part.
//
// Read (combinational) for an issue of kind:
//   PAIR/SINGLE  lanes 0-7 from even warp 2*pair, lanes 8-15 from odd warp;
//                a scalar operand is broadcast over the warp's 8 lanes.
//   WAVE         lane i from warp i: its scalar, or lane 0 of its vector reg.
// Write (clock edge) mirrors this: a warp instruction with a scalar
// destination writes the value of its warp's first lane; a wave writes lane i
// to warp i's scalar, or broadcasts it over warp i's vector register.
// Register count and these mixed-operand rules are this design's choices.
// A debug port reads any register of any warp.
module gw_regfile
  import gw_pkg::*;
#(
  parameter int unsigned NWS = WARPS_PER_SCHED,
  localparam int unsigned PW = $clog2(NWS / 2),
  localparam int unsigned SW_ = $clog2(NWS)
) (
  input  logic             clk,
  // read
  input  iss_kind_e        rd_kind,
  input  logic [PW-1:0]    rd_pair,
  input  reg_t             rd_src1,
  input  reg_t             rd_src2,
  output word_t            rd_a [2*WARP_WIDTH],
  output word_t            rd_b [2*WARP_WIDTH],
  // write
  input  logic             wr_valid,
  input  iss_kind_e        wr_kind,
  input  logic [PW-1:0]    wr_pair,
  input  logic [NWS-1:0]   wr_lanes,     // lane enables (= warp mask for a wave)
  input  reg_t             wr_dst,
  input  word_t            wr_data [2*WARP_WIDTH],
  // debug read
  input  logic [SW_-1:0]   dbg_slot,
  input  reg_t             dbg_reg,
  output word_t            dbg_data [WARP_WIDTH]
);

  localparam int unsigned L = 2 * WARP_WIDTH;

  word_t vreg [NWS][NUM_REGS][WARP_WIDTH];
  word_t sreg [NUM_REGS][NWS];

  function automatic word_t rd_one(iss_kind_e k, logic [PW-1:0] p, reg_t r, int unsigned lane);
    int unsigned w;
    if (k == ISS_WAVE) begin
      w = lane;
      return r.scalar ? sreg[r.idx][w] : vreg[w][r.idx][0];
    end
    w = 2 * int'(p) + lane / WARP_WIDTH;
    return r.scalar ? sreg[r.idx][w] : vreg[w][r.idx][lane % WARP_WIDTH];
  endfunction

  always_comb
    for (int l = 0; l < L; l++) begin
      rd_a[l] = rd_one(rd_kind, rd_pair, rd_src1, l);
      rd_b[l] = rd_one(rd_kind, rd_pair, rd_src2, l);
    end

  always_ff @(posedge clk) begin
    if (wr_valid) begin
      if (wr_kind == ISS_WAVE) begin
        for (int w = 0; w < NWS; w++)
          if (wr_lanes[w]) begin
            if (wr_dst.scalar) sreg[wr_dst.idx][w] <= wr_data[w];
            else for (int j = 0; j < WARP_WIDTH; j++) vreg[w][wr_dst.idx][j] <= wr_data[w];
          end
      end else begin
        for (int h = 0; h < 2; h++)
          if (wr_lanes[h*WARP_WIDTH]) begin
            if (wr_dst.scalar) sreg[wr_dst.idx][2*wr_pair+h] <= wr_data[h*WARP_WIDTH];
            else for (int j = 0; j < WARP_WIDTH; j++)
              vreg[2*wr_pair+h][wr_dst.idx][j] <= wr_data[h*WARP_WIDTH+j];
          end
      end
    end
  end

  always_comb
    for (int j = 0; j < WARP_WIDTH; j++)
      dbg_data[j] = dbg_reg.scalar ? sreg[dbg_reg.idx][dbg_slot] : vreg[dbg_slot][dbg_reg.idx][j];

endmodule
