// arc_alu: the ARC arithmetic unit, a ripple-carry adder/subtractor.
//
// WIDTH one-bit slices are chained from the least significant bit up. The
// add/subtract control is XORed into every B input and also feeds the
// carry into bit 0, so sub = 1 gives a + ~b + 1 = a - b (two's complement
// addition) and sub = 0 gives a + b. ovflo is the carry out of the last
// slice, as in the original design (for subtraction it is the "no borrow"
// bit). z is the NOR of all result bits and n is the top result bit.
// Purely combinational.
//
// The sense of the control follows the ALU figure and the adder netlist
// (control = carry in, 1 = subtraction); one sentence of the original
// prose states the opposite sense.
module arc_alu #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sub,
  output logic [WIDTH-1:0] y,
  output logic             ovflo,
  output logic             z,
  output logic             n
);

  logic [WIDTH:0] c;

  assign c[0] = sub;

  for (genvar i = 0; i < WIDTH; i++) begin : g_slice
    arc_add_slice u_slice (
      .a  (a[i]),
      .b  (b[i]),
      .sub(sub),
      .ci (c[i]),
      .s  (y[i]),
      .co (c[i+1])
    );
  end

  assign ovflo = c[WIDTH];
  assign z     = ~|y;
  assign n     = y[WIDTH-1];

endmodule
