// ft_pkg: types and constants shared by the fault-tolerant superscalar core.
//
// The core executes every committed instruction twice inside its Register
// Update Unit (RUU) and compares the two outcomes to catch transient faults.
// This package holds the instruction encoding, the decoded micro-op and the
// RUU entry. The entry carries the fields of the enhanced RUU entry: two
// source operands (ready, tag, content), destination (register, content),
// dispatched, functional unit, executed, to-reissue, reissued and program
// counter. Field widths, the instruction set and its encoding are this
// design's own choices: a small 32-bit integer RISC with word addressing.
//
// Encoding (32 bits):
//   [31:26] opcode   [25:21] rd (for SW and branches: second source rs2)
//   [20:16] rs1      [15:11] rs2 (R-type)    [15:0] imm16 (I-type, signed)
//   R-type:  ADD SUB AND OR XOR SLT SLL SRL MUL DIV   rd = rs1 op rs2
//   ADDI rd = rs1 + imm       LW rd = mem[rs1 + imm]   SW mem[rs1 + imm] = rd
//   BEQ/BNE/BLT rs1, rd       taken: pc = pc + 1 + imm
//   JAL rd: rd = pc + 1, pc = pc + 1 + imm (call, pushes the return stack)
//   JR  rs1: pc = rs1 (return, pops the return stack)     HALT: stop at commit
package ft_pkg;

  localparam int XLEN   = 32;
  localparam int AREG_W = 5;

  typedef logic [XLEN-1:0] word_t;

  typedef enum logic [5:0] {
    OP_ADD  = 6'd0,  OP_SUB  = 6'd1,  OP_AND  = 6'd2,  OP_OR   = 6'd3,
    OP_XOR  = 6'd4,  OP_SLT  = 6'd5,  OP_SLL  = 6'd6,  OP_SRL  = 6'd7,
    OP_MUL  = 6'd8,  OP_DIV  = 6'd9,  OP_ADDI = 6'd10, OP_LW   = 6'd11,
    OP_SW   = 6'd12, OP_BEQ  = 6'd13, OP_BNE  = 6'd14, OP_BLT  = 6'd15,
    OP_JAL  = 6'd16, OP_JR   = 6'd17, OP_HALT = 6'd18, OP_ILL  = 6'd63
  } opcode_e;

  // Instruction class, used for latency and scheduling decisions.
  typedef enum logic [2:0] {
    CL_ALU, CL_MUL, CL_DIV, CL_LOAD, CL_STORE, CL_BRANCH, CL_JUMP, CL_HALT
  } iclass_e;

  // Decoded instruction as it leaves the decode stage.
  typedef struct packed {
    opcode_e               op;
    iclass_e               cls;
    logic                  has_dest;
    logic [AREG_W-1:0]     rd;
    logic                  use_rs1;
    logic [AREG_W-1:0]     rs1;
    logic                  use_rs2;
    logic [AREG_W-1:0]     rs2;
    word_t                 imm;
    word_t                 pc;
    logic                  pred_taken;   // front end followed the taken path
    word_t                 pred_target;  // next PC the front end followed
    logic [15:0]           ghist;        // global history before this branch
  } uop_t;

  // Outcome of one execution: the value that is compared between the two
  // executions of an instruction.
  typedef struct packed {
    word_t result;   // destination value (or link value)
    word_t addr;     // effective address (loads / stores)
    logic  taken;    // branch direction
    word_t target;   // next PC of a control instruction
  } outcome_t;

  // Work handed from the RUU to a functional unit.
  typedef struct packed {
    logic                  valid;
    logic [6:0]            tag;        // RUU entry index (RUU_SIZE <= 128)
    logic [3:0]            gen;        // entry generation, drops stale results
    logic                  check;      // second (reissued) execution
    logic                  mem_access; // load: also read the data cache
    opcode_e               op;
    iclass_e               cls;
    word_t                 a;
    word_t                 b;
    word_t                 imm;
    word_t                 pc;
  } fu_req_t;

  typedef struct packed {
    logic                  valid;
    logic [6:0]            tag;
    logic [3:0]            gen;
    logic                  check;
    outcome_t              out;
  } fu_resp_t;

  // Sign-extend the 16-bit immediate.
  function automatic word_t sext16(input logic [15:0] v);
    return {{(XLEN-16){v[15]}}, v};
  endfunction

  // Execution latency in cycles of each instruction class; loads take one
  // cycle of address calculation plus one cycle of cache access.
  localparam int LAT_LOAD = 2;

endpackage
