// tb_result_comparator: checks that the comparator flags exactly the
// outcome differences that matter for each instruction class: the result for
// ALU operations, the address only for loads, address and data for stores,
// direction and target for branches, never for HALT.
module tb_result_comparator;
  import ft_pkg::*;
  int checks = 0, failures = 0;
  iclass_e  cls;
  outcome_t a, b;
  logic     mis;
  outcome_t x, y;
  logic [31:0] m;

  result_comparator dut (.cls(cls), .first(a), .second(b), .mismatch(mis));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t(input iclass_e c, input outcome_t x, input outcome_t y, input bit exp);
    cls = c; a = x; b = y; #1;
    checks++;
    if (mis !== exp) begin
      failures++;
      $display("FAIL: class %s mismatch=%0b expected %0b %h %h", c.name(), mis, exp, x, y);
    end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      m = 32'd1 << $urandom_range(31, 0);
      x.result = $urandom; x.addr = $urandom; x.taken = 1'($urandom); x.target = $urandom;
      t(CL_ALU, x, x, 1'b0);
      y = x; y.result = y.result ^ m;
      t(CL_ALU, x, y, 1'b1);
      t(CL_MUL, x, y, 1'b1);
      t(CL_LOAD, x, y, 1'b0);          // load data is not compared
      t(CL_STORE, x, y, 1'b1);         // store data is
      y = x; y.addr = y.addr ^ m;
      t(CL_LOAD, x, y, 1'b1);
      t(CL_STORE, x, y, 1'b1);
      t(CL_ALU, x, y, 1'b0);
      y = x; y.taken = !x.taken;
      t(CL_BRANCH, x, y, 1'b1);
      t(CL_HALT, x, y, 1'b0);
      y = x; y.target = y.target ^ m;
      t(CL_BRANCH, x, y, 1'b1);
      t(CL_JUMP, x, y, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
