// tb_ruu: the RUU with four functional units, a register file model and a
// data memory model around it, fed with decoded instruction groups.
// Checks: an isolated instruction is dispatched twice and commits exactly 6
// cycles after allocation (dispatch, execute, reissue, dispatch, execute and
// compare, commit); committed register and memory values of a dependent
// sequence with loads and stores match values computed here; a fault
// injected into a first execution is detected at the check, the instruction
// is retried and the mispredicted signal invalidates its dependents, and the
// committed values are still correct; a mispredicted branch redirects fetch
// and squashes the younger instructions; check loads do not access memory.
module tb_ruu;
  import ft_pkg::*;
  import ft_asm_pkg::*;
  localparam int W = 4, N = 64, DP = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic alloc_valid [W];
  uop_t alloc_uop [W];
  logic alloc_ready;
  logic [5:0] alloc_tail;
  logic [4:0] rf_raddr [2*W];
  word_t rf_rdata [2*W];
  fu_req_t fu_req [W];
  logic fu_busy [W];
  fu_resp_t fu_resp [W];
  logic rf_we [W];
  logic [4:0] rf_waddr [W];
  word_t rf_wdata [W];
  logic st_we [DP];
  word_t st_addr [DP], st_data [DP];
  logic halted, redirect, redirect_dir, btb_upd;
  word_t redirect_pc, btb_upd_pc, btb_upd_target;
  logic [15:0] redirect_hist;
  logic [3:0] ev_commit, ev_reissue, ev_dispatch, ev_mispred_sig, ev_check_ld;
  logic [7:0] ev_dep_inval;
  logic ev_fault, ev_ld_block, ev_full, ev_br_mispred;

  ruu #(.RUU_SIZE(N), .W(W), .DPORTS(DP)) dut (.*);
  always #5 clk = ~clk;

  // functional units and memory model
  word_t mask [W];
  logic mem_re [W];
  word_t mem_addr [W];
  word_t mem_rdata [W];
  word_t dmem [1024];
  for (genvar f = 0; f < W; f++) begin : g_fu
    func_unit u_fu (.clk, .rst_n, .req(fu_req[f]), .busy(fu_busy[f]), .fault_mask(mask[f]),
                    .mem_re(mem_re[f]), .mem_addr(mem_addr[f]), .mem_rdata(mem_rdata[f]),
                    .resp(fu_resp[f]));
    assign mem_rdata[f] = dmem[10'(mem_addr[f])];
  end
  // register file model
  word_t rf [32];
  always_comb for (int i = 0; i < 2*W; i++) rf_rdata[i] = (rf_raddr[i] == 0) ? 0 : rf[rf_raddr[i]];
  int n_mem_reads = 0, n_disp = 0, n_fault = 0, n_mis = 0, n_inval = 0, n_chk_ld = 0, n_commit = 0;
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < W; p++) if (rf_we[p]) rf[rf_waddr[p]] <= rf_wdata[p];
    for (int p = 0; p < DP; p++) if (st_we[p]) dmem[10'(st_addr[p])] <= st_data[p];
    for (int f = 0; f < W; f++) if (mem_re[f]) n_mem_reads++;
    n_disp += ev_dispatch; n_fault += ev_fault; n_mis += ev_mispred_sig;
    n_inval += ev_dep_inval; n_chk_ld += ev_check_ld; n_commit += ev_commit;
  end

  // decoders for the allocation group
  logic [31:0] g_insn [W];
  word_t g_pc [W], g_tgt [W];
  for (genvar j = 0; j < W; j++) begin : g_dec
    decode_unit u_dec (.insn(g_insn[j]), .pc(g_pc[j]), .pred_taken(1'b0),
                       .pred_target(g_tgt[j]), .ghist(16'd0), .uop(alloc_uop[j]));
  end

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

  // allocate one group at pc0 (targets: fall-through)
  task automatic give(input logic [31:0] ins [W], input int n, input int pc0);
    for (int j = 0; j < W; j++) begin
      alloc_valid[j] = j < n; g_insn[j] = ins[j]; g_pc[j] = pc0 + j; g_tgt[j] = pc0 + j + 1;
    end
    while (!alloc_ready) @(negedge clk);
    @(negedge clk);
    for (int j = 0; j < W; j++) alloc_valid[j] = 0;
  endtask

  task automatic drain();
    int k = 0;
    while (dut.count_q != 0 && k < 500) begin @(negedge clk); k++; end
  endtask

  initial begin
    logic [31:0] g [W];
    int t0, lat;
    foreach (rf[i]) rf[i] = 0;
    foreach (dmem[i]) dmem[i] = i * 3;
    for (int f = 0; f < W; f++) mask[f] = 0;
    for (int j = 0; j < W; j++) begin alloc_valid[j] = 0; g_insn[j] = 0; g_pc[j] = 0; g_tgt[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. latency and double execution of one instruction
    g[0] = ADDI(1, 0, 5); g[1] = 0; g[2] = 0; g[3] = 0;
    t0 = n_disp;
    fork
      give(g, 1, 0);
      begin
        lat = 0;
        @(posedge clk);            // allocation edge
        while (!(rf_we[0] && rf_waddr[0] == 1)) begin @(negedge clk); lat++; end
      end
    join
    chk(lat == 6, $sformatf("isolated ADDI commits %0d cycles after allocation", lat));
    @(negedge clk);
    chk(rf[1] == 5, "r1 = 5");
    chk(n_disp - t0 == 2, $sformatf("dispatched %0d times", n_disp - t0));

    // 2. dependent chain with multiply, store, load
    g[0] = ADD(2, 1, 1); g[1] = MUL(3, 2, 1); g[2] = SW(3, 0, 100); g[3] = LW(4, 0, 100);
    give(g, 4, 1);
    g[0] = ADDI(5, 4, 1); g[1] = LW(6, 1, 10); g[2] = SUB(7, 6, 2); g[3] = ADD(0, 0, 0);
    give(g, 3, 5);
    drain();
    chk(rf[2] == 10 && rf[3] == 50 && rf[4] == 50 && rf[5] == 51, "dependent chain and store-to-load");
    chk(rf[6] == 45 && rf[7] == 35, "load of preloaded data");
    chk(dmem[100] == 50, "store committed");
    chk(n_chk_ld == 2, $sformatf("%0d check loads", n_chk_ld));
    chk(n_mem_reads == 2, $sformatf("loads read memory %0d times (once each)", n_mem_reads));

    // 3. a fault in a first execution: detected, retried, dependents reissued
    t0 = n_fault;
    g[0] = ADDI(8, 0, 7); g[1] = ADD(9, 8, 8); g[2] = ADD(10, 9, 8); g[3] = ADD(0, 0, 0);
    fork
      give(g, 3, 9);
      begin   // corrupt the first result of the ADDI
        while (!(fu_req[0].valid && fu_req[0].op == OP_ADDI)) @(negedge clk);
        @(negedge clk);
        mask[0] = 32'h100;
        @(negedge clk);
        mask[0] = 0;
      end
    join
    drain();
    chk(n_fault - t0 == 1, $sformatf("fault detected %0d times", n_fault - t0));
    chk(n_mis >= 3, $sformatf("mispredicted signal broadcast %0d times", n_mis));
    chk(n_inval >= 2, $sformatf("%0d dependents invalidated", n_inval));
    chk(rf[8] == 7 && rf[9] == 14 && rf[10] == 21, "correct values after recovery");

    // 4. branch misprediction: BEQ taken while fetch followed fall-through
    g[0] = BEQ(0, 0, 5); g[1] = ADDI(11, 0, 99); g[2] = ADDI(12, 0, 98); g[3] = 0;
    fork
      give(g, 3, 20);
      begin
        while (!redirect) @(negedge clk);
        chk(redirect_pc == 26 && redirect_dir, $sformatf("redirect to %0d", redirect_pc));
      end
    join
    drain();
    chk(rf[11] == 0 && rf[12] == 0, "younger instructions squashed");
    chk(n_commit == 1 + 7 + 3 + 1, $sformatf("%0d instructions committed", n_commit));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
