// tb_gshare_bp: checks the gshare predictor against a behavioural model of
// a table of two-bit counters indexed by PC XOR global history: lookups,
// speculative history pushes, history restore, counter saturation, and the
// decode-stage training path.
module tb_gshare_bp;
  localparam int ENTRIES = 4096;
  localparam int HW = 12;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [31:0] lookup_pc = 0, upd_pc = 0;
  logic pred_taken, spec_push = 0, spec_dir = 0, restore = 0, restore_dir = 0, upd_valid = 0, upd_taken = 0;
  logic [15:0] cur_hist, restore_hist = 0, upd_hist = 0;

  gshare_bp #(.ENTRIES(ENTRIES)) dut (.*);
  always #5 clk = ~clk;

  logic [1:0]    m_ctr [ENTRIES];
  logic [HW-1:0] m_hist;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m_ctr[i]) m_ctr[i] = 2'b01;
    m_hist = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      // choose a random mix of actions for this cycle
      lookup_pc   = $urandom % 64;          // few PCs so counters saturate
      spec_push   = ($urandom % 2) == 0;
      spec_dir    = 1'($urandom);
      restore     = ($urandom % 16) == 0;
      restore_hist = 16'($urandom);
      restore_dir = 1'($urandom);
      upd_valid   = ($urandom % 2) == 0;
      upd_pc      = $urandom % 64;
      upd_hist    = 16'($urandom % 8);
      upd_taken   = ($urandom % 4) != 0;
      #1;
      checks++;
      if (pred_taken !== m_ctr[HW'(lookup_pc) ^ m_hist][1] || cur_hist !== 16'(m_hist)) begin
        failures++;
        $display("FAIL: cycle %0d prediction %0b expected %0b", n, pred_taken,
                 m_ctr[HW'(lookup_pc) ^ m_hist][1]);
      end
      @(posedge clk);
      if (upd_valid) begin
        automatic int i = int'(HW'(upd_pc) ^ HW'(upd_hist));
        if (upd_taken && m_ctr[i] != 3) m_ctr[i]++;
        else if (!upd_taken && m_ctr[i] != 0) m_ctr[i]--;
      end
      if (restore) m_hist = {restore_hist[HW-2:0], restore_dir};
      else if (spec_push) m_hist = {m_hist[HW-2:0], spec_dir};
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
