// decode_unit: turns one 32-bit instruction into a micro-op.
//
// Combinational. Extracts opcode, registers and the sign-extended immediate,
// classifies the instruction (ALU, multiply, divide, load, store, branch,
// jump, halt) and states which source registers it reads and whether it
// writes a destination. The prediction fields (pred_taken, pred_target,
// ghist) are copied from the fetch stage so the RUU can check the branch
// later. An unknown opcode decodes to a no-operation. The instruction set is
// this design's own (see ft_pkg).
module decode_unit
  import ft_pkg::*;
(
  input  logic [31:0] insn,
  input  word_t       pc,
  input  logic        pred_taken,
  input  word_t       pred_target,
  input  logic [15:0] ghist,
  output uop_t        uop
);
  logic [5:0] opc;
  assign opc = insn[31:26];

  always_comb begin
    uop             = '0;
    uop.pc          = pc;
    uop.pred_taken  = pred_taken;
    uop.pred_target = pred_target;
    uop.ghist       = ghist;
    uop.rd          = insn[25:21];
    uop.rs1         = insn[20:16];
    uop.rs2         = insn[15:11];
    uop.imm         = sext16(insn[15:0]);
    uop.cls         = CL_ALU;
    uop.op          = OP_ILL;
    unique case (opc)
      6'd0, 6'd1, 6'd2, 6'd3, 6'd4, 6'd5, 6'd6, 6'd7, 6'd8, 6'd9: begin
        uop.op       = opcode_e'(opc);
        uop.cls      = (opc == 6'd8) ? CL_MUL : (opc == 6'd9) ? CL_DIV : CL_ALU;
        uop.has_dest = 1'b1;
        uop.use_rs1  = 1'b1;
        uop.use_rs2  = 1'b1;
      end
      6'd10: begin uop.op = OP_ADDI; uop.has_dest = 1'b1; uop.use_rs1 = 1'b1; end
      6'd11: begin uop.op = OP_LW; uop.cls = CL_LOAD; uop.has_dest = 1'b1; uop.use_rs1 = 1'b1; end
      6'd12, 6'd13, 6'd14, 6'd15: begin
        uop.op      = opcode_e'(opc);
        uop.cls     = (opc == 6'd12) ? CL_STORE : CL_BRANCH;
        uop.use_rs1 = 1'b1;
        uop.use_rs2 = 1'b1;
        uop.rs2     = insn[25:21];
      end
      6'd16: begin uop.op = OP_JAL; uop.cls = CL_JUMP; uop.has_dest = 1'b1; end
      6'd17: begin uop.op = OP_JR; uop.cls = CL_JUMP; uop.use_rs1 = 1'b1; end
      6'd18: begin uop.op = OP_HALT; uop.cls = CL_HALT; end
      default: ;
    endcase
    if (uop.rd == '0) uop.has_dest = 1'b0;
  end
endmodule
