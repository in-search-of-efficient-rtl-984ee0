// fetch_unit: program counter, fetch and branch prediction.
//
// Each cycle the unit reads W consecutive instructions at the PC from the
// instruction cache and predicts where fetch continues. A fetch group ends
// after its first control instruction (branch, JAL, JR), so one prediction
// is made per cycle (this grouping rule is this design's own):
//   * conditional branch: taken when the gshare predictor says taken and the
//     BTB holds its target, otherwise fall through;
//   * JAL (call): the BTB target if it hits, and the return address is
//     pushed on the return address stack;
//   * JR (return): the top of the return address stack, which is popped.
// The group, with each instruction's PC, followed direction and target and
// the global history before it, is held in a register that the decode stage
// reads (out_*). When the decode stage takes the group (accept), the gshare
// counters are updated speculatively with the predicted direction: the
// predictor is trained at decode, not at commit, which is the option the
// design uses to keep prediction accurate despite the long stay of each
// instruction in the window. A redirect from the RUU (branch misprediction)
// empties the group register, restores the global history and restarts
// fetch at redirect_pc the next cycle. `halt` stops fetching.
module fetch_unit
  import ft_pkg::*;
#(
  parameter int unsigned W          = 4,
  parameter int unsigned BP_ENTRIES = 4096,
  parameter int unsigned BTB_ENTRIES = 1024,
  parameter int unsigned BTB_WAYS   = 4,
  parameter int unsigned RAS_DEPTH  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        halt,
  // instruction cache
  output word_t       ic_pc,
  input  logic [31:0] ic_insn [W],
  // fetch group to decode
  output logic        out_valid [W],
  output logic [31:0] out_insn  [W],
  output word_t       out_pc    [W],
  output logic        out_taken [W],
  output word_t       out_target[W],
  output logic [15:0] out_hist  [W],
  input  logic        accept,
  // recovery and training from the RUU
  input  logic        redirect,
  input  word_t       redirect_pc,
  input  logic [15:0] redirect_hist,
  input  logic        redirect_dir,
  input  logic        btb_upd,
  input  word_t       btb_upd_pc,
  input  word_t       btb_upd_target,
  // events
  output logic        ev_bp_update
);
  word_t pc_q;
  assign ic_pc = pc_q;

  // pre-decode: position of the first control instruction in the group
  function automatic logic is_ctrl(input logic [31:0] insn);
    return insn[31:26] inside {6'd13, 6'd14, 6'd15, 6'd16, 6'd17};
  endfunction

  int    cpos;       // index of the first control instruction, W if none
  word_t cpc;
  always_comb begin
    cpos = int'(W);
    for (int i = int'(W) - 1; i >= 0; i--) if (is_ctrl(ic_insn[i])) cpos = i;
    cpc = pc_q + word_t'(cpos);
  end

  logic [5:0]  copc;
  logic        bp_taken, btb_hit;
  word_t       btb_target, ras_top;
  logic [15:0] hist_now;
  assign copc = (cpos < int'(W)) ? ic_insn[cpos][31:26] : 6'd0;

  // predictor training at decode: the conditional branch of the held group
  logic        dec_br_valid;
  word_t       dec_br_pc;
  logic [15:0] dec_br_hist;
  logic        dec_br_dir;
  always_comb begin
    dec_br_valid = 1'b0;
    dec_br_pc    = '0;
    dec_br_hist  = '0;
    dec_br_dir   = 1'b0;
    for (int i = 0; i < int'(W); i++) begin
      if (out_valid[i] && out_insn[i][31:26] inside {6'd13, 6'd14, 6'd15}) begin
        dec_br_valid = 1'b1;
        dec_br_pc    = out_pc[i];
        dec_br_hist  = out_hist[i];
        dec_br_dir   = out_taken[i];
      end
    end
  end
  assign ev_bp_update = accept && dec_br_valid && !redirect;

  logic fire;       // a new group enters the group register this cycle
  logic is_cond, pred_dir;
  word_t next_pc;
  always_comb begin
    is_cond  = (cpos < int'(W)) && (copc inside {6'd13, 6'd14, 6'd15});
    pred_dir = 1'b0;
    next_pc  = pc_q + word_t'(W);
    if (cpos < int'(W)) begin
      next_pc = cpc + 1;
      unique case (copc)
        6'd13, 6'd14, 6'd15: if (bp_taken && btb_hit) begin pred_dir = 1'b1; next_pc = btb_target; end
        6'd16:               if (btb_hit) begin pred_dir = 1'b1; next_pc = btb_target; end
        6'd17:               begin pred_dir = 1'b1; next_pc = ras_top; end
        default: ;
      endcase
    end
  end

  logic any_valid;
  always_comb begin
    any_valid = 1'b0;
    for (int i = 0; i < int'(W); i++) any_valid |= out_valid[i];
  end
  assign fire = !halt && !redirect && (!any_valid || accept);

  gshare_bp #(.ENTRIES(BP_ENTRIES)) u_bp (
    .clk, .rst_n,
    .lookup_pc(cpc), .pred_taken(bp_taken), .cur_hist(hist_now),
    .spec_push(fire && is_cond), .spec_dir(pred_dir),
    .restore(redirect), .restore_hist(redirect_hist), .restore_dir(redirect_dir),
    .upd_valid(ev_bp_update), .upd_pc(dec_br_pc), .upd_hist(dec_br_hist),
    .upd_taken(dec_br_dir)
  );

  btb #(.ENTRIES(BTB_ENTRIES), .WAYS(BTB_WAYS)) u_btb (
    .clk, .rst_n,
    .lookup_pc(cpc), .hit(btb_hit), .target(btb_target),
    .upd_valid(btb_upd), .upd_pc(btb_upd_pc), .upd_target(btb_upd_target)
  );

  ras #(.DEPTH(RAS_DEPTH)) u_ras (
    .clk, .rst_n,
    .push(fire && cpos < int'(W) && copc == 6'd16), .push_addr(cpc + 1),
    .pop(fire && cpos < int'(W) && copc == 6'd17), .top(ras_top)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q <= '0;
      for (int i = 0; i < int'(W); i++) begin
        out_valid[i]  <= 1'b0;
        out_insn[i]   <= '0;
        out_pc[i]     <= '0;
        out_taken[i]  <= 1'b0;
        out_target[i] <= '0;
        out_hist[i]   <= '0;
      end
    end else if (redirect) begin
      pc_q <= redirect_pc;
      for (int i = 0; i < int'(W); i++) out_valid[i] <= 1'b0;
    end else if (fire) begin
      pc_q <= next_pc;
      for (int i = 0; i < int'(W); i++) begin
        out_valid[i]  <= (i <= cpos);
        out_insn[i]   <= ic_insn[i];
        out_pc[i]     <= pc_q + word_t'(i);
        out_taken[i]  <= (i == cpos) && pred_dir;
        out_target[i] <= (i == cpos) ? next_pc : pc_q + word_t'(i) + 1;
        out_hist[i]   <= hist_now;
      end
    end else if (accept || halt) begin
      for (int i = 0; i < int'(W); i++) out_valid[i] <= 1'b0;
    end
  end
endmodule
