// tb_rename_logic: fills a model window with random live entries and
// destinations, then checks each source query of a random allocation group
// against a search written here: the youngest live producer in age order
// from the head, overridden by an earlier member of the same group, and no
// producer for register 0.
module tb_rename_logic;
  localparam int N = 64, W = 4, TW = 6;
  int checks = 0, failures = 0;
  logic ent_valid [N], ent_has_dest [N];
  logic [4:0] ent_rd [N];
  logic [TW-1:0] head, tail;
  logic grp_valid [W], grp_has_dest [W];
  logic [4:0] grp_rd [W];
  logic [4:0] q_reg [2*W];
  logic q_found [2*W], q_in_grp [2*W];
  logic [TW-1:0] q_tag [2*W];
  rename_logic #(.RUU_SIZE(N), .W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      automatic int cnt = $urandom % (N - W + 1);
      head = TW'($urandom);
      tail = TW'(head + TW'(cnt));
      for (int i = 0; i < N; i++) begin
        ent_valid[i] = 0; ent_has_dest[i] = 1'($urandom); ent_rd[i] = 5'($urandom % 8);
      end
      for (int k = 0; k < cnt; k++) ent_valid[TW'(head + TW'(k))] = 1;
      for (int j = 0; j < W; j++) begin
        grp_valid[j] = 1'($urandom); grp_has_dest[j] = 1'($urandom); grp_rd[j] = 5'($urandom % 8);
        q_reg[2*j] = 5'($urandom % 8); q_reg[2*j+1] = 5'($urandom % 8);
      end
      #1;
      for (int q = 0; q < 2*W; q++) begin
        automatic bit f = 0, g = 0;
        automatic int t = 0;
        if (q_reg[q] != 0) begin
          for (int k = 0; k < cnt; k++) begin
            automatic int i = (int'(head) + k) % N;
            if (ent_has_dest[i] && ent_rd[i] == q_reg[q]) begin f = 1; t = i; end
          end
          for (int j = 0; j < q / 2; j++)
            if (grp_valid[j] && grp_has_dest[j] && grp_rd[j] == q_reg[q]) begin
              f = 1; g = 1; t = (int'(tail) + j) % N;
            end
        end
        checks++;
        if (q_found[q] !== f || q_in_grp[q] !== g || (f && int'(q_tag[q]) != t)) begin
          failures++;
          $display("FAIL: query %0d reg %0d found %0b/%0b tag %0d/%0d", q, q_reg[q], q_found[q], f, q_tag[q], t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
