// dcache: data store behind the load/store units.
//
// Holds WORDS 32-bit words (32768 = the 128 KB level-1 data cache of the
// processor model), word addressed, modulo WORDS. RPORTS read ports answer
// combinationally, which gives a load its one cycle of access after the
// address calculation. WPORTS write ports are used by stores as they commit;
// writes take effect at the clock edge, a higher port wins on a conflict.
// It always hits: tags, ways, the 6-cycle miss latency and the level-2 cache
// are not modelled. The limit on how many loads access the cache per cycle
// (2 ports in the 4-way core) is enforced by the scheduler, which dispatches
// no more loads than that; here every functional unit has a read path.
// A separate preload port (ext_we) lets a testbench place data before a run.
module dcache #(
  parameter int unsigned WORDS  = 32768,
  parameter int unsigned RPORTS = 4,
  parameter int unsigned WPORTS = 2,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] raddr [RPORTS],
  output logic [31:0] rdata [RPORTS],
  input  logic        we    [WPORTS],
  input  logic [31:0] waddr [WPORTS],
  input  logic [31:0] wdata [WPORTS],
  input  logic        ext_we,
  input  logic [31:0] ext_addr,
  input  logic [31:0] ext_wdata
);
  logic [31:0] mem [WORDS];

  always_comb begin
    for (int i = 0; i < int'(RPORTS); i++) rdata[i] = mem[AW'(raddr[i])];
  end

  always_ff @(posedge clk) begin
    if (ext_we) mem[AW'(ext_addr)] <= ext_wdata;
    for (int p = 0; p < int'(WPORTS); p++)
      if (we[p]) mem[AW'(waddr[p])] <= wdata[p];
  end
endmodule
