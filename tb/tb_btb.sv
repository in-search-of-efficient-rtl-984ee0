// tb_btb: checks the set-associative BTB against a model that keeps, per
// set, the ways' tags and targets with round-robin replacement: hits return
// the last written target, a fifth PC mapping to a full set evicts the oldest
// way, and unknown PCs miss.
module tb_btb;
  localparam int ENTRIES = 1024, WAYS = 4, SETS = ENTRIES / WAYS;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [31:0] lookup_pc = 0, target, upd_pc = 0, upd_target = 0;
  logic hit, upd_valid = 0;

  btb #(.ENTRIES(ENTRIES), .WAYS(WAYS)) dut (.*);
  always #5 clk = ~clk;

  // model
  logic        m_v   [SETS][WAYS];
  logic [31:0] m_pc  [SETS][WAYS];
  logic [31:0] m_tg  [SETS][WAYS];
  int          m_vic [SETS];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void m_lookup(input logic [31:0] pc, output bit h, output logic [31:0] t);
    automatic int s = int'(pc) % SETS;
    h = 0; t = 0;
    for (int w = 0; w < WAYS; w++) if (m_v[s][w] && m_pc[s][w] == pc) begin h = 1; t = m_tg[s][w]; end
  endfunction

  initial begin
    foreach (m_v[s, w]) m_v[s][w] = 0;
    foreach (m_vic[s]) m_vic[s] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      automatic bit h; automatic logic [31:0] t;
      // PCs from a small pool of sets so that sets fill and evict
      lookup_pc  = ($urandom % 8) + SETS * ($urandom % 7);
      upd_valid  = ($urandom % 3) == 0;
      upd_pc     = ($urandom % 8) + SETS * ($urandom % 7);
      upd_target = $urandom;
      #1;
      m_lookup(lookup_pc, h, t);
      checks++;
      if (hit !== h || (h && target !== t)) begin
        failures++;
        $display("FAIL: pc %0d hit %0b/%0b target %h/%h", lookup_pc, hit, h, target, t);
      end
      @(posedge clk);
      if (upd_valid) begin
        automatic int s = int'(upd_pc) % SETS;
        automatic int way = -1;
        for (int w = 0; w < WAYS; w++) if (m_v[s][w] && m_pc[s][w] == upd_pc) way = w;
        if (way < 0) begin way = m_vic[s]; m_vic[s] = (m_vic[s] + 1) % WAYS; end
        m_v[s][way] = 1; m_pc[s][way] = upd_pc; m_tg[s][way] = upd_target;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
