// ft_asm_pkg: instruction encoders and a reference instruction-set model
// for the testbenches of the fault-tolerant core.
//
// The encoders build 32-bit instruction words in the core's format (see
// ft_pkg). The reference model executes a program one instruction at a time,
// in order, on its own register file and memory, so a testbench can compare
// the core's final architectural state with an independently computed one.
package ft_asm_pkg;

  function automatic logic [31:0] r_op(input int op, rd, rs1, rs2);
    return {6'(op), 5'(rd), 5'(rs1), 5'(rs2), 11'd0};
  endfunction
  function automatic logic [31:0] i_op(input int op, rd, rs1, imm);
    return {6'(op), 5'(rd), 5'(rs1), 16'(imm)};
  endfunction
  function automatic logic [31:0] ADD (input int rd, rs1, rs2); return r_op(0, rd, rs1, rs2); endfunction
  function automatic logic [31:0] SUB (input int rd, rs1, rs2); return r_op(1, rd, rs1, rs2); endfunction
  function automatic logic [31:0] AND_(input int rd, rs1, rs2); return r_op(2, rd, rs1, rs2); endfunction
  function automatic logic [31:0] OR_ (input int rd, rs1, rs2); return r_op(3, rd, rs1, rs2); endfunction
  function automatic logic [31:0] XOR_(input int rd, rs1, rs2); return r_op(4, rd, rs1, rs2); endfunction
  function automatic logic [31:0] SLT (input int rd, rs1, rs2); return r_op(5, rd, rs1, rs2); endfunction
  function automatic logic [31:0] SLL (input int rd, rs1, rs2); return r_op(6, rd, rs1, rs2); endfunction
  function automatic logic [31:0] SRL (input int rd, rs1, rs2); return r_op(7, rd, rs1, rs2); endfunction
  function automatic logic [31:0] MUL (input int rd, rs1, rs2); return r_op(8, rd, rs1, rs2); endfunction
  function automatic logic [31:0] DIV (input int rd, rs1, rs2); return r_op(9, rd, rs1, rs2); endfunction
  function automatic logic [31:0] ADDI(input int rd, rs1, imm); return i_op(10, rd, rs1, imm); endfunction
  function automatic logic [31:0] LW  (input int rd, rs1, imm); return i_op(11, rd, rs1, imm); endfunction
  function automatic logic [31:0] SW  (input int rs2, rs1, imm); return i_op(12, rs2, rs1, imm); endfunction
  function automatic logic [31:0] BEQ (input int rs1, rs2, off); return i_op(13, rs2, rs1, off); endfunction
  function automatic logic [31:0] BNE (input int rs1, rs2, off); return i_op(14, rs2, rs1, off); endfunction
  function automatic logic [31:0] BLT (input int rs1, rs2, off); return i_op(15, rs2, rs1, off); endfunction
  function automatic logic [31:0] JAL (input int rd, off);       return i_op(16, rd, 0, off); endfunction
  function automatic logic [31:0] JR  (input int rs1);           return i_op(17, 0, rs1, 0); endfunction
  function automatic logic [31:0] HALT();                        return {6'd18, 26'd0}; endfunction

  // Reference model state.
  class iss;
    logic [31:0] regs [32];
    logic [31:0] mem  [int];
    logic [31:0] prog [int];
    int          steps;

    function new();
      foreach (regs[i]) regs[i] = '0;
      steps = 0;
    endfunction

    function logic [31:0] rd_mem(input logic [31:0] a);
      return mem.exists(int'(a[14:0])) ? mem[int'(a[14:0])] : '0;
    endfunction

    // Runs until HALT or max_steps; returns 1 when HALT was reached.
    function bit run(input int max_steps);
      logic [31:0] pc = 0;
      while (steps < max_steps) begin
        logic [31:0] in = prog.exists(int'(pc)) ? prog[int'(pc)] : '0;
        logic [5:0]  op = in[31:26];
        int rd = int'(in[25:21]), rs1 = int'(in[20:16]), rs2 = int'(in[15:11]);
        logic [31:0] imm = {{16{in[15]}}, in[15:0]};
        logic [31:0] a = regs[rs1], b = regs[rs2], c = regs[rd];
        logic [31:0] npc = pc + 1;
        logic [31:0] res = '0;
        bit wr = 1'b0;
        steps++;
        case (op)
          0: begin res = a + b; wr = 1; end
          1: begin res = a - b; wr = 1; end
          2: begin res = a & b; wr = 1; end
          3: begin res = a | b; wr = 1; end
          4: begin res = a ^ b; wr = 1; end
          5: begin res = ($signed(a) < $signed(b)) ? 1 : 0; wr = 1; end
          6: begin res = a << b[4:0]; wr = 1; end
          7: begin res = a >> b[4:0]; wr = 1; end
          8: begin res = a * b; wr = 1; end
          9: begin res = (b == 0) ? '1 : 32'($signed(a) / $signed(b)); wr = 1; end
          10: begin res = a + imm; wr = 1; end
          11: begin res = rd_mem(a + imm); wr = 1; end
          12: mem[int'(15'(a + imm))] = c;
          13: if (a == c) npc = pc + 1 + imm;
          14: if (a != c) npc = pc + 1 + imm;
          15: if ($signed(a) < $signed(c)) npc = pc + 1 + imm;
          16: begin res = pc + 1; wr = 1; npc = pc + 1 + imm; end
          17: npc = a;
          18: return 1'b1;
          default: ;
        endcase
        if (wr && rd != 0) regs[rd] = res;
        pc = npc;
      end
      return 1'b0;
    endfunction
  endclass

endpackage
