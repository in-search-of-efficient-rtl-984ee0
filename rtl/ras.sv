// ras: return address stack.
//
// DEPTH (8) entries, used by the fetch stage to predict the target of a
// return (JR). A call (JAL) pushes its return address; a return pops. The
// stack is circular: pushing onto a full stack overwrites the oldest entry,
// and popping an empty stack returns a stale value (the prediction may then
// be wrong, which the branch recovery corrects). Depth follows the processor
// model; overflow behaviour is this design's own. `top` is combinational;
// push and pop take effect at the clock edge, push wins if both are set.
module ras #(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned PW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push,
  input  logic [31:0] push_addr,
  input  logic        pop,
  output logic [31:0] top
);
  logic [31:0]   stk [DEPTH];
  logic [PW-1:0] sp_q;  // index of the top entry

  assign top = stk[sp_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp_q <= '0;
      for (int i = 0; i < int'(DEPTH); i++) stk[i] <= '0;
    end else if (push) begin
      stk[PW'(sp_q + 1'b1)] <= push_addr;
      sp_q                  <= PW'(sp_q + 1'b1);
    end else if (pop) begin
      sp_q <= PW'(sp_q - 1'b1);
    end
  end
endmodule
