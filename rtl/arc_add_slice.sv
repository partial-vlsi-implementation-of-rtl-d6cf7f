// arc_add_slice: one bit of the ARC add/subtract unit.
//
// A full adder whose B input is first XORed with the add/subtract control,
// so that with sub high the slice adds the complement of b. Chained through
// ci/co, WIDTH slices form the ripple-carry adder of arc_alu.
module arc_add_slice (
  input  logic a,
  input  logic b,
  input  logic sub,
  input  logic ci,
  output logic s,
  output logic co
);

  logic bx;

  assign bx = b ^ sub;
  assign s  = a ^ bx ^ ci;
  assign co = (a & bx) | (ci & (a ^ bx));

endmodule
