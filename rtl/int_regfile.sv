// int_regfile: architectural integer register file.
//
// NREGS (32) registers of 32 bits; register 0 always reads zero. It holds
// committed state only: results are written when their instruction commits
// from the RUU (WPORTS writes per cycle, a higher port wins if two commits in
// one cycle write the same register, since it is the younger one). The
// rename stage reads it combinationally (RPORTS reads) for sources with no
// producer left in the RUU. All registers reset to zero.
module int_regfile #(
  parameter int unsigned NREGS  = 32,
  parameter int unsigned RPORTS = 8,
  parameter int unsigned WPORTS = 4,
  localparam int unsigned RW    = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RW-1:0] raddr [RPORTS],
  output logic [31:0]   rdata [RPORTS],
  input  logic          we    [WPORTS],
  input  logic [RW-1:0] waddr [WPORTS],
  input  logic [31:0]   wdata [WPORTS]
);
  logic [31:0] rf [NREGS];

  always_comb begin
    for (int i = 0; i < int'(RPORTS); i++)
      rdata[i] = (raddr[i] == '0) ? '0 : rf[raddr[i]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NREGS); r++) rf[r] <= '0;
    end else begin
      for (int p = 0; p < int'(WPORTS); p++)
        if (we[p] && waddr[p] != '0) rf[waddr[p]] <= wdata[p];
    end
  end
endmodule
