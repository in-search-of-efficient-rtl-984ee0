// result_comparator: compares the two execution outcomes of one instruction.
//
// Every committed instruction runs twice. The outcome of the first run is
// held in the RUU entry; when the second (reissued) run finishes, this block
// compares the two and raises `mismatch` when they differ, which is how a
// transient fault in a functional unit or its control is detected. The
// comparator itself is taken to be fault free (built from hardened cells or
// triplicated in a real implementation; that is a circuit property and not
// expressed here). Purely combinational.
//
// For a load or store only the address (and for a store the data) is
// compared, because a reissued load does not access the data cache again;
// `cls` selects which fields take part.
module result_comparator
  import ft_pkg::*;
(
  input  iclass_e  cls,
  input  outcome_t first,
  input  outcome_t second,
  output logic     mismatch
);
  always_comb begin
    unique case (cls)
      CL_LOAD:   mismatch = (first.addr != second.addr);
      CL_STORE:  mismatch = (first.addr != second.addr) || (first.result != second.result);
      CL_BRANCH: mismatch = (first.taken != second.taken) || (first.target != second.target);
      CL_JUMP:   mismatch = (first.result != second.result) || (first.target != second.target);
      CL_HALT:   mismatch = 1'b0;
      default:   mismatch = (first.result != second.result);
    endcase
  end
endmodule
