// tb_ft_core: end-to-end test of the fault-tolerant core at its default size.
//
// Loads a program (a loop over an array with loads, multiplies, a divide
// chain, stores read back at once, a data-dependent branch, and a call and
// return), runs it on the core while injecting single-bit transient faults
// into functional-unit outputs at random, and compares the final registers
// and the memory the program wrote with an in-order reference model
// (ft_asm_pkg::iss). It also checks that the core committed exactly as many
// instructions as the reference executed, and that each mechanism of the
// design happened at least once: reissue for the check, check loads without a
// cache access, fault detection, the mispredicted signal, dependent
// invalidation, branch misprediction recovery, predictor training at decode,
// a load held behind an older store, and a full window.
module tb_ft_core;
  import ft_pkg::*;
  import ft_asm_pkg::*;

  localparam int W     = 4;     // the core's default width
  localparam int N     = 48;    // loop iterations
  localparam int ABASE = 1000;  // input array
  localparam int BBASE = 2000;  // output array

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        imem_we = 1'b0, dmem_we = 1'b0;
  logic [31:0] imem_addr = '0, imem_wdata = '0, dmem_addr = '0, dmem_wdata = '0;
  logic [31:0] fu_fault_mask [W];
  logic        halted;
  logic [4:0]  dbg_reg = '0;
  logic [31:0] dbg_reg_data, dbg_maddr = '0, dbg_mdata;
  logic [3:0]  ev_commit, ev_reissue, ev_dispatch, ev_mispred_sig, ev_check_ld;
  logic [7:0]  ev_dep_inval;
  logic        ev_fault, ev_ld_block, ev_full, ev_br_mispred, ev_bp_update;

  ft_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;
  longint n_commit = 0, n_reissue = 0, n_fault = 0, n_mis = 0, n_inval = 0, n_chk_ld = 0,
          n_ld_block = 0, n_full = 0, n_br = 0, n_bp = 0, n_disp = 0, n_inject = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [$];
  iss ref_m;

  // Program. Registers: r1 i, r2 N, r3 sum, r10 pointer, r21 = 1, r23 = 3.
  task automatic build();
    prog.push_back(ADDI(1, 0, 0));          // 0
    prog.push_back(ADDI(2, 0, N));          // 1
    prog.push_back(ADDI(3, 0, 0));          // 2
    prog.push_back(ADDI(10, 0, ABASE));     // 3
    prog.push_back(ADDI(21, 0, 1));         // 4
    prog.push_back(ADDI(23, 0, 3));         // 5
    prog.push_back(ADDI(24, 0, 1000));      // 6  divide chain seed
    // loop: 7
    prog.push_back(LW(4, 10, 0));           // 7   a[i]
    prog.push_back(MUL(5, 4, 4));           // 8
    prog.push_back(ADD(3, 3, 5));           // 9
    prog.push_back(SW(3, 10, BBASE - ABASE)); // 10 b[i] = sum
    prog.push_back(LW(6, 10, BBASE - ABASE)); // 11 read it back
    prog.push_back(XOR_(7, 6, 1));          // 12
    prog.push_back(AND_(20, 4, 21));        // 13 a[i] & 1
    prog.push_back(BEQ(20, 0, 1));          // 14 skip next when even
    prog.push_back(ADD(22, 22, 4));         // 15 sum of odd elements
    prog.push_back(DIV(24, 24, 23));        // 16 long-latency chain
    prog.push_back(ADDI(24, 24, 977));      // 17
    prog.push_back(ADDI(10, 10, 1));        // 18
    prog.push_back(ADDI(1, 1, 1));          // 19
    prog.push_back(BLT(1, 2, 7 - 21));      // 20 loop
    prog.push_back(JAL(31, 28 - 22));       // 21 call 28
    prog.push_back(DIV(8, 3, 2));           // 22
    prog.push_back(SW(8, 0, 50));           // 23
    prog.push_back(SUB(9, 8, 7));           // 24
    prog.push_back(SLT(11, 9, 3));          // 25
    prog.push_back(HALT());                 // 26
    prog.push_back(ADD(0, 0, 0));           // 27
    prog.push_back(ADDI(12, 12, 7));        // 28 function
    prog.push_back(SLL(13, 12, 23));        // 29
    prog.push_back(SRL(14, 13, 21));        // 30
    prog.push_back(OR_(15, 13, 3));         // 31
    prog.push_back(SW(15, 0, 51));          // 32
    prog.push_back(JR(31));                 // 33
  endtask

  // Fault injection: now and then flip one bit of one functional unit's
  // output. Faults are single transient events: never on a trusted retry, and
  // never on the check of an instruction whose first execution was already
  // hit (two identical errors would compare equal, which time redundancy
  // cannot detect).
  bit hit_first [64];
  always @(negedge clk) begin
    automatic int f = int'($urandom % W);
    automatic bit go = rst_n && !halted && !$test$plusargs("noinject") && ($urandom % 23) == 0;
    for (int k = 0; k < W; k++) begin
      fu_fault_mask[k] = '0;
      if (dut.fu_resp[k].valid) begin
        automatic int t = int'(dut.fu_resp[k].tag) % 64;
        automatic bit ok = !dut.u_ruu.ent[t].retry && !(dut.fu_resp[k].check && hit_first[t]);
        automatic bit inj = go && k == f && ok;
        if (inj) begin
          fu_fault_mask[k] = 32'd1 << $urandom_range(31, 0);
          n_inject++;
        end
        if (!dut.fu_resp[k].check) hit_first[t] = inj;
      end
    end
  end

  always @(posedge clk) if (rst_n && !halted) begin
    cycles++;
    n_commit   += ev_commit;
    n_reissue  += ev_reissue;
    n_disp     += ev_dispatch;
    n_fault    += ev_fault;
    n_mis      += ev_mispred_sig;
    n_inval    += ev_dep_inval;
    n_chk_ld   += ev_check_ld;
    n_ld_block += ev_ld_block;
    n_full     += ev_full;
    n_br       += ev_br_mispred;
    n_bp       += ev_bp_update;
  end

  initial begin
    for (int f = 0; f < W; f++) fu_fault_mask[f] = '0;
    ref_m = new();
    build();
    // load program and data with the core in reset
    @(negedge clk);
    for (int i = 0; i < prog.size() + 8; i++) begin
      imem_we = 1'b1; imem_addr = i;
      imem_wdata = (i < prog.size()) ? prog[i] : HALT();
      if (i < prog.size()) ref_m.prog[i] = prog[i];
      @(negedge clk);
    end
    imem_we = 1'b0;
    for (int i = 0; i < N; i++) begin
      automatic logic [31:0] v = $urandom % 1000;
      dmem_we = 1'b1; dmem_addr = ABASE + i; dmem_wdata = v;
      ref_m.mem[ABASE + i] = v;
      @(negedge clk);
    end
    for (int i = 0; i < N; i++) begin  // output area and scratch words start at 0
      dmem_we = 1'b1; dmem_addr = BBASE + i; dmem_wdata = 0;
      @(negedge clk);
    end
    dmem_addr = 50; dmem_wdata = 0; @(negedge clk);
    dmem_addr = 51; dmem_wdata = 0; @(negedge clk);
    dmem_we = 1'b0;
    check(ref_m.run(100000), "reference model reached HALT");
    rst_n = 1'b1;

    wait (halted);
    @(negedge clk);
    for (int r = 0; r < 32; r++) begin
      dbg_reg = 5'(r); #1;
      check(dbg_reg_data == ref_m.regs[r],
            $sformatf("r%0d = %0d, expected %0d", r, dbg_reg_data, ref_m.regs[r]));
    end
    for (int i = 0; i < N; i++) begin
      dbg_maddr = BBASE + i; #1;
      check(dbg_mdata == ref_m.rd_mem(BBASE + i), $sformatf("b[%0d] = %0d", i, dbg_mdata));
    end
    dbg_maddr = 50; #1; check(dbg_mdata == ref_m.rd_mem(50), "mem[50]");
    dbg_maddr = 51; #1; check(dbg_mdata == ref_m.rd_mem(51), "mem[51]");
    check(n_commit == longint'(ref_m.steps),
          $sformatf("committed %0d instructions, reference executed %0d", n_commit, ref_m.steps));

    $display("cycles=%0d committed=%0d dispatched=%0d reissued=%0d injected=%0d faults=%0d",
             cycles, n_commit, n_disp, n_reissue, n_inject, n_fault);
    $display("mispredicted-signals=%0d dependents-invalidated=%0d check-loads=%0d load-blocked=%0d window-full=%0d br-mispred=%0d bp-decode-updates=%0d",
             n_mis, n_inval, n_chk_ld, n_ld_block, n_full, n_br, n_bp);
    // every instruction is executed twice: at least one reissue per commit
    check(n_reissue >= n_commit, "every committed instruction was reissued");
    check(n_chk_ld > 0, "check loads without a cache access occurred");
    check(n_fault > 0, "a transient fault was detected");
    check(n_mis > 0, "the mispredicted signal was broadcast");
    check(n_inval > 0, "dependent instructions were invalidated and reissued");
    check(n_br > 0, "a branch misprediction was recovered");
    check(n_bp > 0, "the predictor was trained at decode");
    check(n_ld_block > 0, "a load waited for an older store");
    check(n_full > 0, "the window filled up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
