// rename_logic: finds the producer of each source register of a new group.
//
// The RUU holds the renamed destination of every in-flight instruction, so
// renaming a source register means finding the youngest RUU entry that
// writes it. This block searches the live entries from the oldest (head) to
// the youngest and returns, for each of the 2*W source queries of an
// allocation group, whether a producer exists and its RUU index (tag).
// Earlier members of the same group, which take the tags tail, tail+1, ...,
// override producers already in the RUU; q_in_grp marks such a match, whose
// value cannot be ready yet. When there is no producer the
// value comes from the architectural register file. Register 0 never has a
// producer. Because the map is recomputed from the RUU each cycle, squashing
// entries after a branch misprediction needs no map checkpoint; this
// organisation is this design's own. Purely combinational.
module rename_logic #(
  parameter int unsigned RUU_SIZE = 64,
  parameter int unsigned W        = 4,
  localparam int unsigned TW      = $clog2(RUU_SIZE)
) (
  input  logic          ent_valid    [RUU_SIZE],
  input  logic          ent_has_dest [RUU_SIZE],
  input  logic [4:0]    ent_rd       [RUU_SIZE],
  input  logic [TW-1:0] head,
  input  logic [TW-1:0] tail,
  input  logic          grp_valid    [W],
  input  logic          grp_has_dest [W],
  input  logic [4:0]    grp_rd       [W],
  input  logic [4:0]    q_reg        [2*W],
  output logic          q_found      [2*W],
  output logic          q_in_grp     [2*W],
  output logic [TW-1:0] q_tag        [2*W]
);
  always_comb begin
    for (int q = 0; q < int'(2*W); q++) begin
      q_found[q]  = 1'b0;
      q_in_grp[q] = 1'b0;
      q_tag[q]    = '0;
      // Entries in age order: from the head to the top of the array, then
      // those below the head; the last match is the youngest writer.
      for (int pass = 0; pass < 2; pass++) begin
        for (int i = 0; i < int'(RUU_SIZE); i++) begin
          if (((pass == 0) == (TW'(i) >= head)) && ent_valid[i] && ent_has_dest[i] &&
              ent_rd[i] == q_reg[q] && q_reg[q] != '0) begin
            q_found[q] = 1'b1;
            q_tag[q]   = TW'(i);
          end
        end
      end
      // Group member q/2 sees the destinations of members 0 .. q/2-1.
      for (int j = 0; j < q / 2; j++) begin
        if (grp_valid[j] && grp_has_dest[j] && grp_rd[j] == q_reg[q] && q_reg[q] != '0) begin
          q_found[q]  = 1'b1;
          q_in_grp[q] = 1'b1;
          q_tag[q]    = TW'(tail + TW'(j));
        end
      end
    end
  end
endmodule
