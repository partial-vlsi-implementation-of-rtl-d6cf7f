// arc_reg32: parallel-load, parallel-read register of the ARC datapath.
//
// On a rising clock edge with ld high the register takes d (the destination
// bus); with ld low it keeps its value, as the load/recirculate gating of
// the original D flip-flop register does. rst_n low clears it to
// RESET_VALUE asynchronously (the register's Reset pin, active low). While
// en is high the contents drive bus_out; otherwise bus_out is zero, which
// replaces the tri-state output buffer: the source buses here are OR
// buses, so an undriven source contributes nothing.
//
// RESET_VALUE is zero as in the original; the datapath sets it to 1 for
// the Offset register so that the program counter steps by one word.
module arc_reg32 #(
  parameter int unsigned      WIDTH       = 32,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld,
  input  logic [WIDTH-1:0] d,
  input  logic             en,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] bus_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= RESET_VALUE;
    else if (ld) q <= d;
  end

  assign bus_out = en ? q : '0;

endmodule
