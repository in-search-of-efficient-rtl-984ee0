// tb_dcache: preloads words, then performs random committed-store writes on
// two ports and reads on five ports, checking every read against a model
// (the higher write port wins when both write one word).
module tb_dcache;
  localparam int WORDS = 32768, RP = 5, WP = 2;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [31:0] raddr [RP], rdata [RP];
  logic we [WP];
  logic [31:0] waddr [WP], wdata [WP];
  logic ext_we = 0;
  logic [31:0] ext_addr = 0, ext_wdata = 0;
  dcache #(.WORDS(WORDS), .RPORTS(RP), .WPORTS(WP)) dut (.*);
  always #5 clk = ~clk;
  logic [31:0] m [64];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < WP; p++) begin we[p] = 0; waddr[p] = 0; wdata[p] = 0; end
    for (int p = 0; p < RP; p++) raddr[p] = 0;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      ext_we = 1; ext_addr = 1000 + i; ext_wdata = $urandom; m[i] = ext_wdata;
      @(negedge clk);
    end
    ext_we = 0;
    for (int n = 0; n < 3000; n++) begin
      for (int p = 0; p < RP; p++) raddr[p] = 1000 + ($urandom % 64);
      #1;
      for (int p = 0; p < RP; p++) begin
        checks++;
        if (rdata[p] !== m[raddr[p] - 1000]) begin
          failures++;
          $display("FAIL: read %0d = %h expected %h", raddr[p], rdata[p], m[raddr[p] - 1000]);
        end
      end
      for (int p = 0; p < WP; p++) begin
        we[p] = 1'($urandom); waddr[p] = 1000 + ($urandom % 64); wdata[p] = $urandom;
      end
      @(posedge clk);
      for (int p = 0; p < WP; p++) if (we[p]) m[waddr[p] - 1000] = wdata[p];
      @(negedge clk);
      for (int p = 0; p < WP; p++) we[p] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
