// tb_ras: checks the return address stack against a queue model: pushes and
// pops in random order return the most recent addresses, and pushing past
// the depth of 8 loses the oldest entries only.
module tb_ras;
  localparam int DEPTH = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [31:0] push_addr = 0, top;
  ras #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  logic [31:0] m [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      push = ($urandom % 2) == 0;
      pop  = !push && m.size() > 0 && ($urandom % 3) != 0;
      push_addr = $urandom;
      #1;
      if (m.size() > 0) begin
        checks++;
        if (top !== m[$]) begin
          failures++;
          $display("FAIL: top %h expected %h", top, m[$]);
        end
      end
      @(posedge clk);
      if (push) begin
        m.push_back(push_addr);
        if (m.size() > DEPTH) void'(m.pop_front());
      end else if (pop) void'(m.pop_back());
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
