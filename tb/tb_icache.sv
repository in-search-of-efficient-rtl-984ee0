// tb_icache: writes random instructions and reads fetch groups back at
// random addresses, including groups that wrap at the top of the store.
module tb_icache;
  localparam int WORDS = 32768, FW = 4;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [31:0] pc = 0, waddr = 0, wdata = 0;
  logic [31:0] insn [FW];
  icache #(.WORDS(WORDS), .FETCH_W(FW)) dut (.*);
  always #5 clk = ~clk;
  logic [31:0] m [int];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 512; i++) begin
      automatic int a = (i < 256) ? i : WORDS - 512 + i;
      we = 1; waddr = a; wdata = $urandom; m[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int n = 0; n < 2000; n++) begin
      automatic int a = ($urandom % 2) ? int'($urandom % 250) : WORDS - 256 + int'($urandom % 256);
      pc = a; #1;
      for (int k = 0; k < FW; k++) begin
        automatic int e = (a + k) % WORDS;
        checks++;
        if (insn[k] !== m[e]) begin
          failures++;
          $display("FAIL: pc %0d slot %0d %h expected %h", a, k, insn[k], m[e]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
