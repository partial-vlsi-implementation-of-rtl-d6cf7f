// arc_branch_sel: shared control logic of BRTRUE and BRFALSE.
//
// The two conditional branches differ only in the sense of the condition
// bit CR: BRTRUE branches (T-state T14) when CR is 1 and finishes
// otherwise, BRFALSE the other way round. One control circuit serves both:
// the instruction signal ins is 0 for BRTRUE and 1 for BRFALSE, and the
// XOR of ins and CR says whether the branch is taken. Combinational.
module arc_branch_sel (
  input  logic cr,
  input  logic ins,
  output logic take
);

  assign take = cr ^ ins;

endmodule
