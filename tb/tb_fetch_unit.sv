// tb_fetch_unit: runs the fetch stage over a small program held in a model
// instruction store and checks each fetch group: sequential groups of W,
// a group cut after its first control instruction, a call that misses the
// BTB and falls through, the same call predicted taken after a BTB update
// (pushing its return address), a return predicted from the return stack,
// a conditional branch predicted not taken by the untrained predictor and
// trained when the group is accepted, a stalled group that is held, and a
// redirect.
module tb_fetch_unit;
  import ft_pkg::*;
  import ft_asm_pkg::*;
  localparam int W = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, halt = 0, accept = 0;
  word_t ic_pc;
  logic [31:0] ic_insn [W];
  logic out_valid [W], out_taken [W];
  logic [31:0] out_insn [W];
  word_t out_pc [W], out_target [W];
  logic [15:0] out_hist [W];
  logic redirect = 0, redirect_dir = 0, btb_upd = 0, ev_bp_update;
  word_t redirect_pc = 0, btb_upd_pc = 0, btb_upd_target = 0;
  logic [15:0] redirect_hist = 0;

  fetch_unit #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  logic [31:0] prog [64];
  always_comb for (int i = 0; i < W; i++) ic_insn[i] = prog[6'(ic_pc + i)];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // check the held group: first pc, number of valid slots, last slot's prediction
  task automatic expect_group(input int pc0, input int n, input bit taken, input int target, input string s);
    for (int i = 0; i < W; i++) begin
      chk(out_valid[i] == (i < n), $sformatf("%s: slot %0d valid %0b", s, i, out_valid[i]));
      if (i < n) chk(out_pc[i] == word_t'(pc0 + i) && out_insn[i] == prog[pc0 + i], $sformatf("%s: slot %0d pc %0d", s, i, out_pc[i]));
    end
    chk(out_taken[n-1] == taken && out_target[n-1] == word_t'(target),
        $sformatf("%s: predicted taken %0b target %0d", s, out_taken[n-1], out_target[n-1]));
  endtask

  initial begin
    foreach (prog[i]) prog[i] = ADD(1, 1, 1);
    prog[5]  = JAL(31, 20 - 6);
    prog[21] = JR(31);
    prog[7]  = BEQ(1, 2, 30 - 8);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);                        // group 0..3 fetched
    expect_group(0, 4, 0, 4, "sequential group");
    accept = 1; @(negedge clk); accept = 0;
    expect_group(4, 2, 0, 6, "call with BTB miss");
    // hold: no accept, the group stays
    @(negedge clk);
    expect_group(4, 2, 0, 6, "held group");
    // teach the BTB the call target and refetch from 4
    btb_upd = 1; btb_upd_pc = 5; btb_upd_target = 20;
    redirect = 1; redirect_pc = 4;
    @(negedge clk);
    btb_upd = 0; redirect = 0;
    chk(!out_valid[0], "redirect empties the group");
    @(negedge clk);
    expect_group(4, 2, 1, 20, "call predicted by the BTB");
    accept = 1; @(negedge clk);
    expect_group(20, 2, 1, 6, "return predicted by the return stack");
    @(negedge clk);
    expect_group(6, 2, 0, 8, "branch predicted not taken");
    chk(ev_bp_update, "predictor trained when the branch group is accepted");
    @(negedge clk);
    expect_group(8, 4, 0, 12, "fall-through group after the branch");
    chk(!ev_bp_update, "no training without a branch");
    // halt stops fetching
    halt = 1; @(negedge clk); @(negedge clk);
    chk(!out_valid[0], "halt stops fetch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
