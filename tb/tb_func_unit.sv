// tb_func_unit: drives random operations into one functional unit and checks
// each result against a value computed here, and each latency: 1 cycle for
// simple operations and branches, 4 for multiply, 12 for divide, 2 for a
// load that reads the cache, 1 for a check load that only recomputes its
// address. Also checks that the fault mask corrupts the outcome.
module tb_func_unit;
  import ft_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  fu_req_t req;
  logic busy, mem_re;
  word_t fault_mask, mem_addr, mem_rdata;
  fu_resp_t resp;

  func_unit dut (.*);
  always #5 clk = ~clk;
  assign mem_rdata = mem_addr ^ 32'hA5A5_0000;   // a fake memory

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // issue one request, return the number of cycles until the response
  task automatic run(input opcode_e op, input iclass_e cl, input word_t a, b, imm, pc,
                     input bit check, input bit mem, output outcome_t o, output int lat);
    @(negedge clk);
    req = '0;
    req.valid = 1; req.op = op; req.cls = cl; req.a = a; req.b = b; req.imm = imm;
    req.pc = pc; req.check = check; req.mem_access = mem; req.tag = 7'd5; req.gen = 4'd3;
    @(negedge clk);
    req.valid = 0;
    lat = 1;
    while (!resp.valid) begin @(negedge clk); lat++; end
    o = resp.out;
    chk(resp.tag == 7'd5 && resp.gen == 4'd3 && resp.check == check, "tag/gen/check returned");
  endtask

  initial begin
    outcome_t o;
    int lat;
    req = '0; fault_mask = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      automatic word_t a = $urandom, b = $urandom, imm = sext16(16'($urandom)), pc = $urandom % 4096;
      automatic word_t bo = b | 32'd1;
      automatic int    sa = int'(a), sb = int'(bo);
      automatic word_t quo = word_t'(sa / sb);
      run(OP_ADD, CL_ALU, a, b, imm, pc, 0, 0, o, lat);
      chk(o.result == a + b && lat == 1, $sformatf("ADD %0d lat %0d", o.result, lat));
      run(OP_SUB, CL_ALU, a, b, imm, pc, 0, 0, o, lat);
      chk(o.result == a - b && lat == 1, "SUB");
      run(OP_XOR, CL_ALU, a, b, imm, pc, 0, 0, o, lat);
      chk(o.result == (a ^ b), "XOR");
      run(OP_SLT, CL_ALU, a, b, imm, pc, 0, 0, o, lat);
      chk(o.result == (($signed(a) < $signed(b)) ? 1 : 0), "SLT");
      run(OP_SRL, CL_ALU, a, b, imm, pc, 0, 0, o, lat);
      chk(o.result == a >> (b % 32), "SRL");
      run(OP_MUL, CL_MUL, a, b, imm, pc, 0, 0, o, lat);
      chk(o.result == a * b && lat == 4, $sformatf("MUL lat %0d", lat));
      run(OP_DIV, CL_DIV, a, bo, imm, pc, 0, 0, o, lat);
      chk(o.result == quo && lat == 12, $sformatf("DIV lat %0d %h %h %h", lat, o.result, a, b));
      run(OP_ADDI, CL_ALU, a, b, imm, pc, 0, 0, o, lat);
      chk(o.result == a + imm, "ADDI");
      run(OP_LW, CL_LOAD, a, b, imm, pc, 0, 1, o, lat);
      chk(o.addr == a + imm && o.result == ((a + imm) ^ 32'hA5A5_0000) && lat == 2,
          $sformatf("LW lat %0d", lat));
      run(OP_LW, CL_LOAD, a, b, imm, pc, 1, 0, o, lat);
      chk(o.addr == a + imm && lat == 1, $sformatf("check LW lat %0d", lat));
      run(OP_SW, CL_STORE, a, b, imm, pc, 0, 0, o, lat);
      chk(o.addr == a + imm && o.result == b, "SW");
      run(OP_BEQ, CL_BRANCH, a, (n % 2) ? a : b, imm, pc, 0, 0, o, lat);
      chk(o.taken == (n % 2 == 1 || a == b) && o.target == (o.taken ? pc + 1 + imm : pc + 1), "BEQ");
      run(OP_BLT, CL_BRANCH, a, b, imm, pc, 0, 0, o, lat);
      chk(o.taken == ($signed(a) < $signed(b)), "BLT");
      run(OP_JAL, CL_JUMP, a, b, imm, pc, 0, 0, o, lat);
      chk(o.result == pc + 1 && o.target == pc + 1 + imm, "JAL");
      run(OP_JR, CL_JUMP, a, b, imm, pc, 0, 0, o, lat);
      chk(o.target == a && o.taken, "JR");
    end
    // divide by zero
    run(OP_DIV, CL_DIV, 32'd7, 32'd0, 0, 0, 0, 0, o, lat);
    chk(o.result == '1, "DIV by zero");
    // a busy unit takes nothing: a divide holds it for 12 cycles
    @(negedge clk);
    req = '0; req.valid = 1; req.op = OP_DIV; req.cls = CL_DIV; req.a = 100; req.b = 7;
    @(negedge clk);
    req.valid = 1; req.op = OP_ADD; req.cls = CL_ALU;
    chk(busy, "busy during divide");
    // the adder request waits; the divide result comes first
    while (!resp.valid) @(negedge clk);
    chk(resp.out.result == 14, "divide result while a request waits");
    @(negedge clk); req.valid = 0;
    chk(resp.valid && resp.out.result == 107, "queued ADD accepted when the divide finished");
    // fault mask
    @(negedge clk);
    fault_mask = 32'h10;
    req = '0; req.valid = 1; req.op = OP_ADD; req.cls = CL_ALU; req.a = 1; req.b = 2;
    @(negedge clk); req.valid = 0;
    chk(resp.valid && resp.out.result == (32'd3 ^ 32'h10), "fault mask flips the result");
    fault_mask = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
