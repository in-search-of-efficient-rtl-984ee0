// tb_decode_unit: encodes instructions of every kind with random fields
// (using ft_asm_pkg) and checks the decoded opcode, class, registers,
// immediate, destination flag and carried prediction fields.
module tb_decode_unit;
  import ft_pkg::*;
  import ft_asm_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] insn;
  word_t pc, pred_target;
  logic pred_taken;
  logic [15:0] ghist;
  uop_t uop;
  decode_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      automatic int rd = $urandom % 32, rs1 = $urandom % 32, rs2 = $urandom % 32;
      automatic int imm = int'($urandom % 65536) - 32768;
      automatic int k = $urandom % 19;
      pc = $urandom; pred_target = $urandom; pred_taken = 1'($urandom); ghist = 16'($urandom);
      case (k)
        0: insn = ADD(rd, rs1, rs2);   1: insn = SUB(rd, rs1, rs2);
        2: insn = AND_(rd, rs1, rs2);  3: insn = OR_(rd, rs1, rs2);
        4: insn = XOR_(rd, rs1, rs2);  5: insn = SLT(rd, rs1, rs2);
        6: insn = SLL(rd, rs1, rs2);   7: insn = SRL(rd, rs1, rs2);
        8: insn = MUL(rd, rs1, rs2);   9: insn = DIV(rd, rs1, rs2);
        10: insn = ADDI(rd, rs1, imm); 11: insn = LW(rd, rs1, imm);
        12: insn = SW(rs2, rs1, imm);  13: insn = BEQ(rs1, rs2, imm);
        14: insn = BNE(rs1, rs2, imm); 15: insn = BLT(rs1, rs2, imm);
        16: insn = JAL(rd, imm);       17: insn = JR(rs1);
        default: insn = HALT();
      endcase
      #1;
      chk(int'(uop.op) == k, $sformatf("opcode %0d decoded %0d", k, uop.op));
      chk(uop.pc == pc && uop.pred_target == pred_target && uop.pred_taken == pred_taken &&
          uop.ghist == ghist, "prediction fields carried");
      if (k <= 9) begin
        chk(uop.rs1 == 5'(rs1) && uop.rs2 == 5'(rs2) && uop.use_rs1 && uop.use_rs2, "R-type sources");
        chk(uop.has_dest == (rd != 0) && uop.rd == 5'(rd), "R-type destination");
        chk(uop.cls == (k == 8 ? CL_MUL : k == 9 ? CL_DIV : CL_ALU), "R-type class");
      end else if (k == 10 || k == 11) begin
        chk(uop.imm == word_t'(imm) && uop.use_rs1 && !uop.use_rs2 && uop.has_dest == (rd != 0), "I-type");
        chk(uop.cls == (k == 11 ? CL_LOAD : CL_ALU), "I-type class");
      end else if (k >= 12 && k <= 15) begin
        chk(uop.rs1 == 5'(rs1) && uop.rs2 == 5'(rs2) && uop.use_rs1 && uop.use_rs2 && !uop.has_dest &&
            uop.imm == word_t'(imm), "store/branch operands");
        chk(uop.cls == (k == 12 ? CL_STORE : CL_BRANCH), "store/branch class");
      end else if (k == 16) begin
        chk(uop.cls == CL_JUMP && uop.has_dest == (rd != 0) && !uop.use_rs1 && uop.imm == word_t'(imm), "JAL");
      end else if (k == 17) begin
        chk(uop.cls == CL_JUMP && uop.use_rs1 && uop.rs1 == 5'(rs1) && !uop.has_dest, "JR");
      end else begin
        chk(uop.cls == CL_HALT && !uop.has_dest, "HALT");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
