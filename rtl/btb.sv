// btb: set-associative branch target buffer.
//
// ENTRIES (1K) targets organised as ENTRIES/WAYS sets of WAYS (4) ways,
// indexed by the low PC bits and tagged with the rest. The fetch stage looks
// up the target of a control instruction combinationally. An update writes
// the target of a taken control instruction when it resolves: an existing
// entry for that PC is overwritten, otherwise the set's round-robin victim is
// replaced. Size and associativity follow the processor model; the
// replacement policy and the update point are this design's own.
module btb #(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned WAYS    = 4,
  localparam int unsigned SETS   = ENTRIES / WAYS,
  localparam int unsigned SW     = $clog2(SETS),
  localparam int unsigned WW     = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] lookup_pc,
  output logic        hit,
  output logic [31:0] target,
  input  logic        upd_valid,
  input  logic [31:0] upd_pc,
  input  logic [31:0] upd_target
);
  typedef struct packed {
    logic           valid;
    logic [31-SW:0] tag;
    logic [31:0]    target;
  } btb_ent_t;

  btb_ent_t      ent [SETS][WAYS];
  logic [WW-1:0] victim [SETS];

  logic [SW-1:0] ls, us;
  assign ls = lookup_pc[SW-1:0];
  assign us = upd_pc[SW-1:0];

  always_comb begin
    hit    = 1'b0;
    target = '0;
    for (int w = 0; w < int'(WAYS); w++) begin
      if (ent[ls][w].valid && ent[ls][w].tag == lookup_pc[31:SW]) begin
        hit    = 1'b1;
        target = ent[ls][w].target;
      end
    end
  end

  logic          uhit;
  logic [WW-1:0] uway;
  always_comb begin
    uhit = 1'b0;
    uway = victim[us];
    for (int w = 0; w < int'(WAYS); w++) begin
      if (ent[us][w].valid && ent[us][w].tag == upd_pc[31:SW]) begin
        uhit = 1'b1;
        uway = WW'(w);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SETS); s++) begin
        victim[s] <= '0;
        for (int w = 0; w < int'(WAYS); w++) ent[s][w] <= '0;
      end
    end else if (upd_valid) begin
      ent[us][uway] <= '{valid: 1'b1, tag: upd_pc[31:SW], target: upd_target};
      if (!uhit) victim[us] <= WW'((int'(victim[us]) + 1) % int'(WAYS));
    end
  end
endmodule
