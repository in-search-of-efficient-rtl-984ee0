// ruu: Register Update Unit with time-redundant fault detection and recovery.
//
// The RUU is the instruction window of the out-of-order core: a circular
// buffer of RUU_SIZE (64) entries allocated in program order at decode,
// holding renamed operands and results, and retired in order. Each entry is
// the enhanced entry of the fault-tolerant design: two source operands
// (ready, tag, content), the destination (register, content), and the
// dispatched, functional-unit, executed, to-reissue and reissued bits plus
// the program counter.
//
// Time redundancy. An instruction is dispatched to any free functional unit
// once its operands are ready; the to-reissue bit is set at that first
// dispatch. The first result is broadcast on the result bus by tag, held in
// the destination content and marks the entry executed. When an executed
// entry reaches the commit window (the W oldest entries) with to-reissue
// set, it is reissued instead of committed: to-reissue is cleared and the
// entry is dispatched again. The second result is compared with the held
// one (result_comparator). Only an instruction whose two outcomes agree
// commits. For loads and stores the second execution repeats only the
// address calculation and compares addresses; the data-cache access is done
// once (the final configuration of the design).
//
// Recovery by reissue. On a mismatch the faulty instruction's dispatched and
// executed bits are cleared and its reissued bit set; its retry is trusted
// (faults are taken to be transient). When an entry with the reissued bit
// finishes, the "mispredicted" signal is broadcast with its result: every
// entry whose source tag matches takes the new value, and if it had already
// been dispatched it is invalidated in turn (dispatched and executed
// cleared, reissued set). Dependents are so found and reissued serially, one
// level per execution. An invalidated dependent executes twice again.
//
// Other behaviour:
//  * Dispatch takes ready entries oldest first, each to the lowest-numbered
//    free functional unit, at most W per cycle.
//  * Branch/jump outcomes are checked against the path the front end
//    followed on every value-producing execution; on a misprediction the
//    younger entries are squashed and fetch is redirected (oldest one per
//    cycle).
//  * A load may access the data cache only when every older store in the
//    window has a known address and none has the load's address; stores
//    write the cache at commit (at most DPORTS per cycle) and at most DPORTS
//    loads access the cache per cycle (the cache port count).
//  * When a corrected store finishes, younger loads that already ran are
//    reissued as well, since register tags do not cover memory dependences.
//  * A result still in a functional unit for an entry that has since been
//    invalidated or squashed is dropped by a per-entry generation count.
//  * Commit writes up to W results per cycle to the register file. A
//    committed HALT stops the core (halted).
//
// Interface timing: allocation, dispatch (fu_req), completion (fu_resp) and
// commit all happen in one clock cycle each; fu_req is combinational from
// the current state, the rest updates at the clock edge. alloc_ready is high
// when W entries are free; a group is taken whole. Sizes follow the 4-way
// processor model (W=4, DPORTS=2, 64 entries); the 8-way model is W=8,
// DPORTS=4. The commit-window reading of "ready to commit", the trusted
// retry, the generation count and the store/load ordering details are this
// design's own choices.
module ruu
  import ft_pkg::*;
#(
  parameter int unsigned RUU_SIZE = 64,
  parameter int unsigned W        = 4,
  parameter int unsigned DPORTS   = 2,
  localparam int unsigned TW      = $clog2(RUU_SIZE)
) (
  input  logic          clk,
  input  logic          rst_n,
  // allocation (decode / rename)
  input  logic          alloc_valid [W],
  input  uop_t          alloc_uop   [W],
  output logic          alloc_ready,
  output logic [TW-1:0] alloc_tail,
  output logic [4:0]    rf_raddr    [2*W],
  input  word_t         rf_rdata    [2*W],
  // functional units
  output fu_req_t       fu_req      [W],
  input  logic          fu_busy     [W],
  input  fu_resp_t      fu_resp     [W],
  // commit
  output logic          rf_we       [W],
  output logic [4:0]    rf_waddr    [W],
  output word_t         rf_wdata    [W],
  output logic          st_we       [DPORTS],
  output word_t         st_addr     [DPORTS],
  output word_t         st_data     [DPORTS],
  output logic          halted,
  // branch recovery and predictor training
  output logic          redirect,
  output word_t         redirect_pc,
  output logic [15:0]   redirect_hist,
  output logic          redirect_dir,
  output logic          btb_upd,
  output word_t         btb_upd_pc,
  output word_t         btb_upd_target,
  // events, one pulse or count per cycle
  output logic [3:0]    ev_commit,
  output logic [3:0]    ev_reissue,      // entries reissued for their check
  output logic [3:0]    ev_dispatch,
  output logic          ev_fault,        // two outcomes disagreed
  output logic [3:0]    ev_mispred_sig,  // mispredicted signals broadcast
  output logic [7:0]    ev_dep_inval,    // dependents invalidated
  output logic [3:0]    ev_check_ld,     // check loads without cache access
  output logic          ev_ld_block,     // a load waited for an older store
  output logic          ev_full,         // allocation stalled, window full
  output logic          ev_br_mispred
);

  typedef logic [TW-1:0] tag_t;

  typedef struct packed {
    logic  ready;
    logic  from_ruu;   // value comes from (or came from) an RUU entry
    tag_t  tag;
    word_t content;
  } src_t;

  typedef struct packed {
    logic     valid;
    uop_t     u;
    src_t     s1;
    src_t     s2;
    outcome_t dest;        // destination content (first outcome)
    logic     res_ok;      // destination content has been produced
    logic     dispatched;
    logic [7:0] fu;        // functional unit number
    logic     executed;
    logic     to_reissue;
    logic     reissued;
    logic     checking;    // next / current execution is the check
    logic     retry;       // faulty instruction, retry is trusted
    logic [3:0] gen;
  } ent_t;

  ent_t ent [RUU_SIZE];
  tag_t head_q, tail_q;
  logic [TW:0] count_q;
  logic halted_q;

  assign alloc_tail = tail_q;
  assign halted     = halted_q;

  // ---------------------------------------------------------------- rename
  logic ev_valid [RUU_SIZE], ev_hd [RUU_SIZE];
  logic [4:0] ev_rd [RUU_SIZE];
  logic g_valid [W], g_hd [W];
  logic [4:0] g_rd [W];
  logic [4:0] q_reg [2*W];
  logic q_found [2*W];
  logic q_in_grp [2*W];
  tag_t q_tag [2*W];

  always_comb begin
    for (int i = 0; i < int'(RUU_SIZE); i++) begin
      ev_valid[i] = ent[i].valid;
      ev_hd[i]    = ent[i].u.has_dest;
      ev_rd[i]    = ent[i].u.rd;
    end
    for (int j = 0; j < int'(W); j++) begin
      g_valid[j]      = alloc_valid[j];
      g_hd[j]         = alloc_uop[j].has_dest;
      g_rd[j]         = alloc_uop[j].rd;
      q_reg[2*j]      = alloc_uop[j].rs1;
      q_reg[2*j+1]    = alloc_uop[j].rs2;
      rf_raddr[2*j]   = alloc_uop[j].rs1;
      rf_raddr[2*j+1] = alloc_uop[j].rs2;
    end
  end

  rename_logic #(.RUU_SIZE(RUU_SIZE), .W(W)) u_rename (
    .ent_valid(ev_valid), .ent_has_dest(ev_hd), .ent_rd(ev_rd),
    .head(head_q), .tail(tail_q),
    .grp_valid(g_valid), .grp_has_dest(g_hd), .grp_rd(g_rd),
    .q_reg(q_reg), .q_found(q_found), .q_in_grp(q_in_grp), .q_tag(q_tag)
  );

  // ---------------------------------------------------------------- completion
  // A response is live when its entry still exists with the same generation.
  logic     cp_live  [W];
  tag_t     cp_tag   [W];
  logic     cp_mis   [W];   // comparator mismatch (check executions)
  logic     bc_valid [W];   // value-producing completion: result broadcast
  logic     bc_mispr [W];   // ... with the mispredicted signal
  logic     bc_st_fix [W];  // ... from a store (younger loads are reissued)
  tag_t     cp_age   [W];

  for (genvar p = 0; p < int'(W); p++) begin : g_cmp
    result_comparator u_cmp (
      .cls(ent[cp_tag[p]].u.cls), .first(ent[cp_tag[p]].dest),
      .second(fu_resp[p].out), .mismatch(cp_mis[p])
    );
  end

  always_comb begin
    for (int p = 0; p < int'(W); p++) begin
      cp_tag[p]   = tag_t'(fu_resp[p].tag);
      cp_live[p]  = fu_resp[p].valid && ent[cp_tag[p]].valid && ent[cp_tag[p]].dispatched &&
                    ent[cp_tag[p]].gen == fu_resp[p].gen;
      bc_valid[p] = cp_live[p] && !fu_resp[p].check;
      bc_mispr[p] = bc_valid[p] && ent[cp_tag[p]].reissued;
      bc_st_fix[p] = bc_mispr[p] && ent[cp_tag[p]].u.cls == CL_STORE;
      cp_age[p]   = tag_t'(cp_tag[p] - head_q);
    end
  end

  // Oldest branch misprediction among this cycle's value-producing completions.
  logic  br_mis;
  tag_t  br_tag;
  outcome_t br_out;
  always_comb begin
    automatic int best = RUU_SIZE;
    br_mis = 1'b0;
    br_tag = '0;
    br_out = '0;
    for (int p = 0; p < int'(W); p++) begin
      automatic ent_t e = ent[cp_tag[p]];
      automatic int age = int'(tag_t'(cp_tag[p] - head_q));
      if (bc_valid[p] && (e.u.cls == CL_BRANCH || e.u.cls == CL_JUMP) &&
          fu_resp[p].out.target != e.u.pred_target && age < best) begin
        best   = age;
        br_mis = 1'b1;
        br_tag = cp_tag[p];
        br_out = fu_resp[p].out;
      end
    end
  end

  assign redirect      = br_mis;
  assign redirect_pc   = br_out.target;
  assign redirect_hist = ent[br_tag].u.ghist;
  assign redirect_dir  = br_out.taken;

  // Train the BTB with the oldest taken control instruction that completes.
  always_comb begin
    btb_upd        = 1'b0;
    btb_upd_pc     = '0;
    btb_upd_target = '0;
    for (int p = int'(W) - 1; p >= 0; p--) begin
      if (bc_valid[p] && fu_resp[p].out.taken &&
          (ent[cp_tag[p]].u.cls == CL_BRANCH || ent[cp_tag[p]].u.cls == CL_JUMP) &&
          ent[cp_tag[p]].u.op != OP_JR) begin
        btb_upd        = 1'b1;
        btb_upd_pc     = ent[cp_tag[p]].u.pc;
        btb_upd_target = fu_resp[p].out.target;
      end
    end
  end

  // ---------------------------------------------------------------- dispatch
  // Age of each entry: its distance from the head (0 = oldest).
  tag_t age [RUU_SIZE];
  always_comb for (int i = 0; i < int'(RUU_SIZE); i++) age[i] = tag_t'(tag_t'(i) - head_q);

  // Memory ordering: the load in entry i may access the cache when no older
  // store has an unknown (or not yet trusted) address or the same address.
  logic  st_live [RUU_SIZE];   // entry holds a store
  logic  st_unk  [RUU_SIZE];   // ... whose address is not known yet
  word_t ld_addr [RUU_SIZE];
  logic  ld_ok   [RUU_SIZE];
  always_comb begin
    for (int j = 0; j < int'(RUU_SIZE); j++) begin
      st_live[j] = ent[j].valid && ent[j].u.cls == CL_STORE;
      st_unk[j]  = !ent[j].res_ok || ent[j].reissued || ent[j].retry;
      ld_addr[j] = ent[j].s1.content + ent[j].u.imm;
    end
    for (int i = 0; i < int'(RUU_SIZE); i++) begin
      ld_ok[i] = 1'b1;
      for (int j = 0; j < int'(RUU_SIZE); j++)
        if (st_live[j] && age[j] < age[i] && (st_unk[j] || ent[j].dest.addr == ld_addr[i]))
          ld_ok[i] = 1'b0;
    end
  end

  // Dispatch in age order: first the entries from the head to the top of the
  // array, then those below the head.
  logic disp   [RUU_SIZE];   // entry is dispatched this cycle
  logic blocked_ld;
  always_comb begin
    automatic int nsel = 0;
    automatic int nmem = 0;
    automatic logic fu_taken [W];
    for (int f = 0; f < int'(W); f++) begin
      fu_req[f]   = '0;
      fu_taken[f] = fu_busy[f];
    end
    blocked_ld = 1'b0;
    for (int i = 0; i < int'(RUU_SIZE); i++) disp[i] = 1'b0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < int'(RUU_SIZE); i++) begin
        automatic logic mem = (ent[i].u.cls == CL_LOAD) && !ent[i].checking;
        if (((pass == 0) == (tag_t'(i) >= head_q)) && ent[i].valid && !ent[i].dispatched &&
            ent[i].s1.ready && ent[i].s2.ready && nsel < int'(W)) begin
          automatic logic ok = 1'b1;
          if (mem) begin
            if (nmem >= int'(DPORTS)) ok = 1'b0;
            else if (!ld_ok[i]) begin ok = 1'b0; blocked_ld = 1'b1; end
          end
          if (ok) begin
            for (int f = 0; f < int'(W); f++) begin
              if (ok && !fu_taken[f]) begin
                fu_taken[f]          = 1'b1;
                ok                   = 1'b0;
                disp[i]              = 1'b1;
                nsel++;
                if (mem) nmem++;
                fu_req[f].valid      = 1'b1;
                fu_req[f].tag        = 7'(i);
                fu_req[f].gen        = ent[i].gen;
                fu_req[f].check      = ent[i].checking;
                fu_req[f].mem_access = mem;
                fu_req[f].op         = ent[i].u.op;
                fu_req[f].cls        = ent[i].u.cls;
                fu_req[f].a          = ent[i].s1.content;
                fu_req[f].b          = ent[i].s2.content;
                fu_req[f].imm        = ent[i].u.imm;
                fu_req[f].pc         = ent[i].u.pc;
              end
            end
          end
        end
      end
    end
  end

  // Which unit each dispatched entry went to (for the functional unit field).
  logic [7:0] disp_fu [RUU_SIZE];
  always_comb begin
    for (int i = 0; i < int'(RUU_SIZE); i++) disp_fu[i] = '0;
    for (int f = 0; f < int'(W); f++)
      if (fu_req[f].valid) disp_fu[tag_t'(fu_req[f].tag)] = 8'(f);
  end

  // ---------------------------------------------------------------- commit
  logic       cm_commit  [W];
  logic       cm_reissue [W];
  int         n_commit;
  always_comb begin
    automatic logic blocked = halted_q;
    automatic int nst = 0;
    n_commit = 0;
    for (int p = 0; p < int'(DPORTS); p++) begin
      st_we[p] = 1'b0; st_addr[p] = '0; st_data[p] = '0;
    end
    for (int k = 0; k < int'(W); k++) begin
      automatic tag_t i = tag_t'(head_q + tag_t'(k));
      automatic ent_t e = ent[i];
      cm_commit[k]  = 1'b0;
      cm_reissue[k] = 1'b0;
      rf_we[k]      = 1'b0;
      rf_waddr[k]   = e.u.rd;
      rf_wdata[k]   = e.dest.result;
      if (k >= int'(count_q) || !e.valid) begin
        blocked = 1'b1;
      end else if (e.executed && e.to_reissue) begin
        cm_reissue[k] = 1'b1;
        blocked       = 1'b1;
      end else if (e.executed && !e.checking && !blocked) begin
        if (e.u.cls == CL_STORE) begin
          if (nst < int'(DPORTS)) begin
            st_we[nst]   = 1'b1;
            st_addr[nst] = e.dest.addr;
            st_data[nst] = e.dest.result;
            nst++;
            cm_commit[k] = 1'b1;
          end else blocked = 1'b1;
        end else begin
          cm_commit[k] = 1'b1;
          rf_we[k]     = e.u.has_dest;
        end
        if (cm_commit[k]) begin
          n_commit++;
          if (e.u.cls == CL_HALT) blocked = 1'b1;
        end
      end else begin
        blocked = 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- allocation
  int n_alloc;
  always_comb begin
    n_alloc = 0;
    for (int j = 0; j < int'(W); j++) if (alloc_valid[j]) n_alloc++;
  end
  assign alloc_ready = (int'(count_q) + int'(W) <= int'(RUU_SIZE)) && !halted_q;
  logic do_alloc;
  assign do_alloc = alloc_ready && !br_mis && (n_alloc != 0);

  // Operand for a new entry: from a live producer, the result bus, or the RF.
  function automatic src_t new_src(input logic used, input logic found, input logic in_grp,
                                   input tag_t t, input word_t rfv);
    src_t s;
    s = '{ready: 1'b1, from_ruu: 1'b0, tag: t, content: rfv};
    if (!used) begin
      s.content = '0;
    end else if (in_grp) begin
      s.from_ruu = 1'b1;
      s.ready    = 1'b0;
      s.content  = '0;
    end else if (found) begin
      s.from_ruu  = 1'b1;
      s.ready   = ent[t].res_ok;
      s.content = ent[t].dest.result;
      for (int p = 0; p < int'(W); p++)
        if (bc_valid[p] && cp_tag[p] == t) begin
          s.ready   = 1'b1;
          s.content = fu_resp[p].out.result;
        end
      for (int k = 0; k < int'(W); k++)
        if (cm_commit[k] && tag_t'(head_q + tag_t'(k)) == t) s.from_ruu = 1'b0;
    end
    return s;
  endfunction

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(RUU_SIZE); i++) ent[i] <= '0;
      head_q   <= '0;
      tail_q   <= '0;
      count_q  <= '0;
      halted_q <= 1'b0;
    end else begin
      // dispatch
      for (int i = 0; i < int'(RUU_SIZE); i++) begin
        if (disp[i]) begin
          ent[i].dispatched <= 1'b1;
          ent[i].fu         <= disp_fu[i];
          if (!ent[i].checking && !ent[i].retry) ent[i].to_reissue <= 1'b1;
        end
      end
      // completion
      for (int p = 0; p < int'(W); p++) begin
        if (cp_live[p]) begin
          automatic tag_t t = cp_tag[p];
          if (fu_resp[p].check) begin
            if (cp_mis[p]) begin
              ent[t].dispatched <= 1'b0;
              ent[t].executed   <= 1'b0;
              ent[t].checking   <= 1'b0;
              ent[t].reissued   <= 1'b1;
              ent[t].retry      <= 1'b1;
              ent[t].gen        <= ent[t].gen + 4'd1;
            end else begin
              ent[t].executed   <= 1'b1;
              ent[t].checking   <= 1'b0;
            end
          end else begin
            ent[t].dest     <= fu_resp[p].out;
            ent[t].res_ok   <= 1'b1;
            ent[t].executed <= 1'b1;
            ent[t].reissued <= 1'b0;
            ent[t].retry    <= 1'b0;
            if (br_mis && br_tag == t) begin
              ent[t].u.pred_target <= fu_resp[p].out.target;
              ent[t].u.pred_taken  <= fu_resp[p].out.taken;
            end
          end
        end
      end
      // commit window: reissue for the check, or retire (an invalidation
      // below in the same cycle takes precedence)
      for (int k = 0; k < int'(W); k++) begin
        automatic tag_t i = tag_t'(head_q + tag_t'(k));
        if (cm_reissue[k]) begin
          ent[i].to_reissue <= 1'b0;
          ent[i].checking   <= 1'b1;
          ent[i].dispatched <= 1'b0;
          ent[i].executed   <= 1'b0;
        end
        if (cm_commit[k]) begin
          ent[i].valid <= 1'b0;
          if (ent[i].u.cls == CL_HALT) halted_q <= 1'b1;
          // the tag is free again: consumers stop matching it
          for (int c = 0; c < int'(RUU_SIZE); c++) begin
            if (ent[c].s1.tag == i) ent[c].s1.from_ruu <= 1'b0;
            if (ent[c].s2.tag == i) ent[c].s2.from_ruu <= 1'b0;
          end
        end
      end
      // result bus: operand capture and, with the mispredicted signal,
      // invalidation of dependents that were already dispatched
      for (int i = 0; i < int'(RUU_SIZE); i++) begin
        automatic logic inval = 1'b0;
        for (int p = 0; p < int'(W); p++) begin
          if (bc_valid[p] && ent[i].valid) begin
            if (ent[i].s1.from_ruu && ent[i].s1.tag == cp_tag[p]) begin
              ent[i].s1.ready   <= 1'b1;
              ent[i].s1.content <= fu_resp[p].out.result;
              if (bc_mispr[p] && (ent[i].dispatched || disp[i] || ent[i].checking)) inval = 1'b1;
            end
            if (ent[i].s2.from_ruu && ent[i].s2.tag == cp_tag[p]) begin
              ent[i].s2.ready   <= 1'b1;
              ent[i].s2.content <= fu_resp[p].out.result;
              if (bc_mispr[p] && (ent[i].dispatched || disp[i] || ent[i].checking)) inval = 1'b1;
            end
          end
        end
        // A store whose address or data was corrected also reissues the
        // younger loads that already ran: they may have read around it.
        for (int p = 0; p < int'(W); p++)
          if (bc_st_fix[p] && ent[i].valid &&
              ent[i].u.cls == CL_LOAD && (ent[i].dispatched || disp[i] || ent[i].checking) &&
              age[i] > cp_age[p]) inval = 1'b1;
        if (inval) begin
          ent[i].dispatched <= 1'b0;
          ent[i].executed   <= 1'b0;
          ent[i].checking   <= 1'b0;
          ent[i].reissued   <= 1'b1;
          ent[i].gen        <= ent[i].gen + 4'd1;
        end
      end
      head_q <= tag_t'(head_q + tag_t'(n_commit));
      // squash on a branch misprediction, else allocate the decoded group
      if (br_mis) begin
        automatic int keep = int'(tag_t'(br_tag - head_q)) + 1;
        for (int i = 0; i < int'(RUU_SIZE); i++) begin
          if (int'(age[i]) >= keep && ent[i].valid) begin
            ent[i].valid <= 1'b0;
            ent[i].gen   <= ent[i].gen + 4'd1;
          end
        end
        tail_q  <= tag_t'(br_tag + 1'b1);
        count_q <= (TW+1)'(keep - n_commit);
      end else begin
        automatic int na = 0;
        if (do_alloc) begin
          for (int j = 0; j < int'(W); j++) begin
            if (alloc_valid[j]) begin
              automatic tag_t i = tag_t'(tail_q + tag_t'(na));
              ent[i].valid      <= 1'b1;
              ent[i].u          <= alloc_uop[j];
              ent[i].s1         <= new_src(alloc_uop[j].use_rs1, q_found[2*j], q_in_grp[2*j], q_tag[2*j], rf_rdata[2*j]);
              ent[i].s2         <= new_src(alloc_uop[j].use_rs2, q_found[2*j+1], q_in_grp[2*j+1], q_tag[2*j+1], rf_rdata[2*j+1]);
              ent[i].dest       <= '0;
              ent[i].res_ok     <= 1'b0;
              ent[i].dispatched <= 1'b0;
              ent[i].fu         <= '0;
              ent[i].executed   <= 1'b0;
              ent[i].to_reissue <= 1'b0;
              ent[i].reissued   <= 1'b0;
              ent[i].checking   <= 1'b0;
              ent[i].retry      <= 1'b0;
              na++;
            end
          end
        end
        tail_q  <= tag_t'(tail_q + tag_t'(na));
        count_q <= (TW+1)'(int'(count_q) + na - n_commit);
      end
    end
  end

  // ---------------------------------------------------------------- events
  always_comb begin
    automatic int nr = 0, nd = 0, nm = 0, nc = 0, ni = 0;
    ev_fault = 1'b0;
    for (int k = 0; k < int'(W); k++) if (cm_reissue[k]) nr++;
    for (int i = 0; i < int'(RUU_SIZE); i++) begin
      if (disp[i]) nd++;
      if (disp[i] && ent[i].checking && ent[i].u.cls == CL_LOAD) nc++;
    end
    for (int p = 0; p < int'(W); p++) begin
      if (bc_mispr[p]) nm++;
      if (cp_live[p] && fu_resp[p].check && cp_mis[p]) ev_fault = 1'b1;
    end
    for (int i = 0; i < int'(RUU_SIZE); i++) begin
      automatic logic hit = 1'b0;
      for (int p = 0; p < int'(W); p++)
        if (bc_mispr[p] && ent[i].valid && (ent[i].dispatched || disp[i] || ent[i].checking) &&
            ((ent[i].s1.from_ruu && ent[i].s1.tag == cp_tag[p]) ||
             (ent[i].s2.from_ruu && ent[i].s2.tag == cp_tag[p]))) hit = 1'b1;
      if (hit) ni++;
    end
    ev_commit      = 4'(n_commit);
    ev_reissue     = 4'(nr);
    ev_dispatch    = 4'(nd);
    ev_mispred_sig = 4'(nm);
    ev_dep_inval   = 8'(ni);
    ev_check_ld    = 4'(nc);
    ev_ld_block    = blocked_ld;
    ev_full        = (n_alloc != 0) && !alloc_ready && !halted_q;
    ev_br_mispred  = br_mis;
  end

  // The window never holds more entries than it has.
  a_count: assert property (@(posedge clk) disable iff (!rst_n) count_q <= (TW+1)'(RUU_SIZE));
  // A committed instruction has been executed twice (to-reissue cleared).
  a_commit_checked: assert property (@(posedge clk) disable iff (!rst_n)
    !(cm_commit[0] && ent[head_q].to_reissue));

endmodule
