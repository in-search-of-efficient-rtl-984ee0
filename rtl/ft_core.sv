// ft_core: fault-tolerant out-of-order superscalar core (top level).
//
// A W-way (4) superscalar core built around a Register Update Unit (RUU)
// that detects and recovers from transient faults by time redundancy: every
// instruction is executed twice before it commits, the two outcomes are
// compared, and a mismatch is repaired by re-executing the faulty
// instruction and, through the RUU's mispredicted signal, its dependents.
// Protection therefore covers the functional units, the address
// calculation and their control, while the instruction cache, register file
// and RUU storage are expected to carry parity or ECC (not modelled).
//
// Pipeline: fetch (fetch_unit with gshare, BTB and return stack, reading the
// icache) -> decode and rename (decode_unit per slot, rename inside the RUU)
// -> RUU allocation -> dispatch to W universal functional units (func_unit)
// -> result broadcast -> reissue for the check -> in-order commit to the
// integer register file (int_regfile) and, for stores, to the data cache
// (dcache). The branch predictor is trained at decode; reissued loads do not
// access the data cache again; at most DPORTS loads access it per cycle.
//
// Interface: the program is written into the instruction store with
// imem_we/imem_addr/imem_wdata and data preloaded with dmem_we/...; both
// while the core is held in reset or before it runs. Execution starts at
// address 0 after reset and stops when a HALT instruction commits (halted).
// fu_fault_mask[i] is XORed into the outputs of functional unit i: a test
// input for injecting transient faults, zero in normal use. dbg_* read the
// architectural registers and data memory. ev_* are per-cycle event counts.
// Sizes default to the 4-way configuration of the processor model.
module ft_core
  import ft_pkg::*;
#(
  parameter int unsigned W           = 4,
  parameter int unsigned RUU_SIZE    = 64,
  parameter int unsigned DPORTS      = 2,
  parameter int unsigned MUL_LAT     = 4,
  parameter int unsigned DIV_LAT     = 12,
  parameter int unsigned BP_ENTRIES  = 4096,
  parameter int unsigned BTB_ENTRIES = 1024,
  parameter int unsigned BTB_WAYS    = 4,
  parameter int unsigned RAS_DEPTH   = 8,
  parameter int unsigned IWORDS      = 32768,
  parameter int unsigned DWORDS      = 32768
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        imem_we,
  input  logic [31:0] imem_addr,
  input  logic [31:0] imem_wdata,
  input  logic        dmem_we,
  input  logic [31:0] dmem_addr,
  input  logic [31:0] dmem_wdata,
  input  logic [31:0] fu_fault_mask [W],
  output logic        halted,
  input  logic [4:0]  dbg_reg,
  output logic [31:0] dbg_reg_data,
  input  logic [31:0] dbg_maddr,
  output logic [31:0] dbg_mdata,
  output logic [3:0]  ev_commit,
  output logic [3:0]  ev_reissue,
  output logic [3:0]  ev_dispatch,
  output logic        ev_fault,
  output logic [3:0]  ev_mispred_sig,
  output logic [7:0]  ev_dep_inval,
  output logic [3:0]  ev_check_ld,
  output logic        ev_ld_block,
  output logic        ev_full,
  output logic        ev_br_mispred,
  output logic        ev_bp_update
);
  // ---------------------------------------------------------------- front end
  word_t       ic_pc;
  logic [31:0] ic_insn [W];
  logic        g_valid [W];
  logic [31:0] g_insn  [W];
  word_t       g_pc    [W];
  logic        g_taken [W];
  word_t       g_target[W];
  logic [15:0] g_hist  [W];
  logic        accept, alloc_ready;
  logic        redirect, redirect_dir, btb_upd;
  word_t       redirect_pc, btb_upd_pc, btb_upd_target;
  logic [15:0] redirect_hist;

  icache #(.WORDS(IWORDS), .FETCH_W(W)) u_icache (
    .clk, .pc(ic_pc), .insn(ic_insn),
    .we(imem_we), .waddr(imem_addr), .wdata(imem_wdata)
  );

  fetch_unit #(.W(W), .BP_ENTRIES(BP_ENTRIES), .BTB_ENTRIES(BTB_ENTRIES),
               .BTB_WAYS(BTB_WAYS), .RAS_DEPTH(RAS_DEPTH)) u_fetch (
    .clk, .rst_n, .halt(halted),
    .ic_pc, .ic_insn,
    .out_valid(g_valid), .out_insn(g_insn), .out_pc(g_pc), .out_taken(g_taken),
    .out_target(g_target), .out_hist(g_hist), .accept,
    .redirect, .redirect_pc, .redirect_hist, .redirect_dir,
    .btb_upd, .btb_upd_pc, .btb_upd_target, .ev_bp_update
  );

  uop_t g_uop [W];
  for (genvar i = 0; i < int'(W); i++) begin : g_dec
    decode_unit u_dec (
      .insn(g_insn[i]), .pc(g_pc[i]), .pred_taken(g_taken[i]),
      .pred_target(g_target[i]), .ghist(g_hist[i]), .uop(g_uop[i])
    );
  end

  assign accept = alloc_ready && !redirect;

  // ---------------------------------------------------------------- window
  logic [4:0]  rf_raddr [2*W+1];
  word_t       rf_rdata [2*W+1];
  logic [4:0]  ruu_raddr [2*W];
  word_t       ruu_rdata [2*W];
  logic        rf_we    [W];
  logic [4:0]  rf_waddr [W];
  word_t       rf_wdata [W];
  logic        st_we    [DPORTS];
  word_t       st_addr  [DPORTS];
  word_t       st_data  [DPORTS];
  fu_req_t     fu_req   [W];
  logic        fu_busy  [W];
  fu_resp_t    fu_resp  [W];
  logic [$clog2(RUU_SIZE)-1:0] alloc_tail;

  ruu #(.RUU_SIZE(RUU_SIZE), .W(W), .DPORTS(DPORTS)) u_ruu (
    .clk, .rst_n,
    .alloc_valid(g_valid), .alloc_uop(g_uop), .alloc_ready, .alloc_tail,
    .rf_raddr(ruu_raddr), .rf_rdata(ruu_rdata),
    .fu_req, .fu_busy, .fu_resp,
    .rf_we, .rf_waddr, .rf_wdata, .st_we, .st_addr, .st_data, .halted,
    .redirect, .redirect_pc, .redirect_hist, .redirect_dir,
    .btb_upd, .btb_upd_pc, .btb_upd_target,
    .ev_commit, .ev_reissue, .ev_dispatch, .ev_fault, .ev_mispred_sig,
    .ev_dep_inval, .ev_check_ld, .ev_ld_block, .ev_full, .ev_br_mispred
  );

  always_comb begin
    for (int i = 0; i < int'(2*W); i++) begin
      rf_raddr[i]  = ruu_raddr[i];
      ruu_rdata[i] = rf_rdata[i];
    end
    rf_raddr[2*W] = dbg_reg;
  end
  assign dbg_reg_data = rf_rdata[2*W];

  int_regfile #(.NREGS(32), .RPORTS(2*W+1), .WPORTS(W)) u_rf (
    .clk, .rst_n, .raddr(rf_raddr), .rdata(rf_rdata),
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata)
  );

  // ---------------------------------------------------------------- execute
  logic  mem_re   [W];
  word_t mem_addr [W];
  word_t d_raddr  [W+1];
  word_t d_rdata  [W+1];

  for (genvar f = 0; f < int'(W); f++) begin : g_fu
    func_unit #(.MUL_LAT(MUL_LAT), .DIV_LAT(DIV_LAT)) u_fu (
      .clk, .rst_n, .req(fu_req[f]), .busy(fu_busy[f]),
      .fault_mask(fu_fault_mask[f]),
      .mem_re(mem_re[f]), .mem_addr(mem_addr[f]), .mem_rdata(d_rdata[f]),
      .resp(fu_resp[f])
    );
    assign d_raddr[f] = mem_addr[f];
  end
  assign d_raddr[W] = dbg_maddr;
  assign dbg_mdata  = d_rdata[W];

  dcache #(.WORDS(DWORDS), .RPORTS(W+1), .WPORTS(DPORTS)) u_dcache (
    .clk, .raddr(d_raddr), .rdata(d_rdata),
    .we(st_we), .waddr(st_addr), .wdata(st_data),
    .ext_we(dmem_we), .ext_addr(dmem_addr), .ext_wdata(dmem_wdata)
  );

  // At most DPORTS loads read the data cache in any cycle.
  always_comb begin
    automatic int n = 0;
    for (int f = 0; f < int'(W); f++) if (mem_re[f]) n++;
    a_dports: assert (!rst_n || n <= int'(DPORTS));
  end
endmodule
