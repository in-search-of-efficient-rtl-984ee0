// tb_int_regfile: random commits on four write ports and reads on eight
// ports against a model; register 0 stays zero and the higher write port
// (the younger instruction) wins when two commits write one register.
module tb_int_regfile;
  localparam int RP = 8, WP = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] raddr [RP];
  logic [31:0] rdata [RP];
  logic we [WP];
  logic [4:0] waddr [WP];
  logic [31:0] wdata [WP];
  int_regfile #(.NREGS(32), .RPORTS(RP), .WPORTS(WP)) dut (.*);
  always #5 clk = ~clk;
  logic [31:0] m [32];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m[i]) m[i] = 0;
    for (int p = 0; p < WP; p++) begin we[p] = 0; waddr[p] = 0; wdata[p] = 0; end
    for (int p = 0; p < RP; p++) raddr[p] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      for (int p = 0; p < RP; p++) raddr[p] = 5'($urandom);
      #1;
      for (int p = 0; p < RP; p++) begin
        checks++;
        if (rdata[p] !== m[raddr[p]]) begin
          failures++;
          $display("FAIL: r%0d = %h expected %h", raddr[p], rdata[p], m[raddr[p]]);
        end
      end
      for (int p = 0; p < WP; p++) begin
        we[p] = 1'($urandom); waddr[p] = 5'($urandom % 8); wdata[p] = $urandom;
      end
      @(posedge clk);
      for (int p = 0; p < WP; p++) if (we[p] && waddr[p] != 0) m[waddr[p]] = wdata[p];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
