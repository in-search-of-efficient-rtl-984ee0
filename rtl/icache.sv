// icache: instruction store feeding the fetch stage.
//
// Holds WORDS 32-bit instructions (32768 words = the 128 KB of the level-1
// instruction cache in the processor model) and returns FETCH_W consecutive
// instructions starting at the word address `pc` in the same cycle, so a
// whole fetch group is read at once. It always hits: the tags, the 2-way
// organisation and the refill path from the level-2 cache are not modelled.
// The program is written through the load port (we/waddr/wdata) before the
// core runs; the write takes effect at the clock edge. Addresses wrap modulo
// WORDS.
module icache #(
  parameter int unsigned WORDS   = 32768,
  parameter int unsigned FETCH_W = 4,
  localparam int unsigned AW     = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] pc,
  output logic [31:0] insn [FETCH_W],
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);
  logic [31:0] mem [WORDS];

  always_comb begin
    for (int i = 0; i < int'(FETCH_W); i++) insn[i] = mem[AW'(pc + 32'(i))];
  end

  always_ff @(posedge clk) begin
    if (we) mem[AW'(waddr)] <= wdata;
  end
endmodule
