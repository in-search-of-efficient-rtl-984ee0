// func_unit: one universal integer functional unit.
//
// Any unit executes any operation, as in the processor model this core
// follows. Simple operations, branches and jumps take 1 cycle, multiply
// MUL_LAT (4) and divide DIV_LAT (12) cycles. A load takes one cycle of
// address calculation and then one cycle of data-cache access (the cache
// answers combinationally on mem_addr/mem_rdata in that second cycle). A
// reissued (check) load, marked by req.check with req.mem_access low, only
// recalculates its address and finishes in 1 cycle: the memory access is
// performed once per load.
//
// Interface: a request is accepted in a cycle where `busy` is low; the
// response appears in resp for one cycle when the latency has elapsed. A unit
// can accept a new request in the same cycle its previous one completes.
// Multiply and divide are not pipelined: the unit is busy until they finish
// (this pipelining choice is this design's own).
//
// fault_mask is XORed into the result, address and target of the response
// (not into load data, which comes from the data cache).
// It is a test aid that lets a testbench inject a transient fault; tie it to
// zero in normal use. Divide by zero returns all ones (own choice).
module func_unit
  import ft_pkg::*;
#(
  parameter int unsigned MUL_LAT = 4,
  parameter int unsigned DIV_LAT = 12
) (
  input  logic     clk,
  input  logic     rst_n,
  input  fu_req_t  req,
  output logic     busy,
  input  word_t    fault_mask,
  output logic     mem_re,
  output word_t    mem_addr,
  input  word_t    mem_rdata,
  output fu_resp_t resp
);
  logic            pend_q;
  logic [4:0]      cnt_q;
  logic            ld_q;
  fu_resp_t        r_q;
  outcome_t        o;
  int unsigned     lat;

  // Outcome of the request being accepted.
  always_comb begin
    o        = '0;
    o.target = req.pc + 1;
    unique case (req.op)
      OP_ADD:  o.result = req.a + req.b;
      OP_SUB:  o.result = req.a - req.b;
      OP_AND:  o.result = req.a & req.b;
      OP_OR:   o.result = req.a | req.b;
      OP_XOR:  o.result = req.a ^ req.b;
      OP_SLT:  o.result = word_t'($signed(req.a) < $signed(req.b));
      OP_SLL:  o.result = req.a << req.b[4:0];
      OP_SRL:  o.result = req.a >> req.b[4:0];
      OP_MUL:  o.result = req.a * req.b;
      OP_DIV:  o.result = (req.b == '0) ? '1 : word_t'($signed(req.a) / $signed(req.b));
      OP_ADDI: o.result = req.a + req.imm;
      OP_LW:   o.addr   = req.a + req.imm;
      OP_SW:   begin o.addr = req.a + req.imm; o.result = req.b; end
      OP_BEQ, OP_BNE, OP_BLT: begin
        o.taken  = (req.op == OP_BEQ) ? (req.a == req.b) :
                   (req.op == OP_BNE) ? (req.a != req.b) :
                                        ($signed(req.a) < $signed(req.b));
        o.target = o.taken ? req.pc + 1 + req.imm : req.pc + 1;
      end
      OP_JAL:  begin o.result = req.pc + 1; o.taken = 1'b1; o.target = req.pc + 1 + req.imm; end
      OP_JR:   begin o.taken = 1'b1; o.target = req.a; end
      default: ;
    endcase
    unique case (req.cls)
      CL_MUL:  lat = MUL_LAT;
      CL_DIV:  lat = DIV_LAT;
      CL_LOAD: lat = req.mem_access ? LAT_LOAD : 1;
      default: lat = 1;
    endcase
  end

  assign busy = pend_q && (cnt_q != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q <= 1'b0;
      cnt_q  <= '0;
      ld_q   <= 1'b0;
      r_q    <= '0;
    end else begin
      if (busy) begin
        cnt_q <= cnt_q - 1'b1;
      end else if (req.valid) begin
        pend_q      <= 1'b1;
        cnt_q       <= 5'(lat - 1);
        ld_q        <= (req.cls == CL_LOAD) && req.mem_access;
        r_q.valid   <= 1'b1;
        r_q.tag     <= req.tag;
        r_q.gen     <= req.gen;
        r_q.check   <= req.check;
        r_q.out     <= o;
      end else begin
        pend_q <= 1'b0;
      end
    end
  end

  assign mem_re   = pend_q && (cnt_q == 0) && ld_q;
  assign mem_addr = r_q.out.addr;

  always_comb begin
    resp       = r_q;
    resp.valid = pend_q && (cnt_q == 0);
    // Load data comes from the (ECC-protected) data cache, outside the
    // functional unit, so an injected fault does not touch it.
    if (ld_q) resp.out.result = mem_rdata;
    else      resp.out.result = resp.out.result ^ fault_mask;
    resp.out.addr   = resp.out.addr   ^ fault_mask;
    resp.out.target = resp.out.target ^ fault_mask;
  end
endmodule
