// gw_decode: instruction decoder of the GW front end.
//
// Purely combinational. Splits a 32-bit instruction word (format in gw_pkg)
// into the decoded form kept in Instruction Storage and extracts the scalar
// flag, which the architecture requires every instruction to carry so that
// scalar instructions can be routed to scalar-wave formation. It also works
// out which operands are read and whether a destination is written, which
// the scoreboard uses. Field layout and opcodes are this design's own.
//
// Interface: instr (word) -> dinst (decoded), scalar (flag).
module gw_decode
  import gw_pkg::*;
(
  input  logic [31:0] instr,
  output dinst_t      dinst,
  output logic        scalar
);

  opcode_e op;

  always_comb begin
    op     = opcode_e'(instr[30:27]);
    scalar = instr[31];

    dinst      = '0;
    dinst.op   = op;
    dinst.dst  = reg_t'(instr[26:22]);
    dinst.src1 = reg_t'(instr[21:17]);
    dinst.src2 = reg_t'(instr[16:12]);
    dinst.imm  = instr[11:0];

    unique case (op)
      OP_ADD, OP_SUB, OP_MUL, OP_AND, OP_OR, OP_XOR, OP_SLT: begin
        dinst.wr = 1'b1; dinst.rd1 = 1'b1; dinst.rd2 = 1'b1;
      end
      OP_ADDI: begin
        dinst.wr = 1'b1; dinst.rd1 = 1'b1;
      end
      OP_MOVI, OP_WID, OP_LID, OP_SIMDW: begin
        dinst.wr = 1'b1;
      end
      OP_BNZ, OP_BZ: begin
        dinst.rd1 = 1'b1; dinst.branch = 1'b1;
      end
      OP_EXIT: dinst.ex = 1'b1;
      default: ;  // OP_NOP
    endcase
  end

endmodule
