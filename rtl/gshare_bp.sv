// gshare_bp: gshare two-level adaptive branch direction predictor.
//
// A table of ENTRIES (4K) two-bit saturating counters is indexed by the
// branch PC XOR the global branch history (log2(ENTRIES) bits). The fetch
// stage looks up a prediction and pushes the predicted direction into the
// history (spec_push). The counters are updated speculatively at the decode
// stage with the predicted direction, because no outcome is known yet then;
// updating this early rather than at commit is what keeps the predictor
// accurate while each instruction waits in the RUU to be executed a second
// time. On a branch misprediction the history is restored from the
// mispredicted branch's checkpoint with the real outcome appended.
//
// The table size follows the processor model; the history length, counter
// reset value (weakly not taken) and history repair are this design's own.
// Lookups are combinational; all updates take effect at the next clock edge.
// If restore and spec_push happen together, restore wins.
module gshare_bp #(
  parameter int unsigned ENTRIES = 4096,
  localparam int unsigned HW = $clog2(ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [31:0]   lookup_pc,
  output logic          pred_taken,
  output logic [15:0]   cur_hist,
  input  logic          spec_push,
  input  logic          spec_dir,
  input  logic          restore,
  input  logic [15:0]   restore_hist,
  input  logic          restore_dir,
  input  logic          upd_valid,
  input  logic [31:0]   upd_pc,
  input  logic [15:0]   upd_hist,
  input  logic          upd_taken
);
  logic [1:0]    ctr [ENTRIES];
  logic [HW-1:0] hist_q;
  logic [HW-1:0] li, ui;

  assign li         = lookup_pc[HW-1:0] ^ hist_q;
  assign ui         = upd_pc[HW-1:0] ^ upd_hist[HW-1:0];
  assign pred_taken = ctr[li][1];
  assign cur_hist   = 16'(hist_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist_q <= '0;
    end else if (restore) begin
      hist_q <= {restore_hist[HW-2:0], restore_dir};
    end else if (spec_push) begin
      hist_q <= {hist_q[HW-2:0], spec_dir};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) ctr[i] <= 2'b01;
    end else if (upd_valid) begin
      if (upd_taken && ctr[ui] != 2'b11)       ctr[ui] <= ctr[ui] + 2'b01;
      else if (!upd_taken && ctr[ui] != 2'b00) ctr[ui] <= ctr[ui] - 2'b01;
    end
  end
endmodule
