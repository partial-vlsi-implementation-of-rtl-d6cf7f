// arc_bus: one bus of the ARC datapath (S1, S2 or D).
//
// N sources each present a value and an enable. The enabled source's value
// appears on dout; with no source enabled the bus reads zero, which the
// datapath uses as a zero operand. The original design uses tri-state
// buffers onto a bus wire and models the wire as a single worst-case delay
// buffer; here the bus is an AND-OR multiplexer with no delay, and an
// assertion checks the bus rule that at most one source drives it at a
// time. Purely combinational.
module arc_bus #(
  parameter int unsigned N     = 2,
  parameter int unsigned WIDTH = 32
) (
  input  logic                      clk,
  input  logic [N-1:0]              en,
  input  logic [N-1:0][WIDTH-1:0]   din,
  output logic [WIDTH-1:0]          dout
);

  always_comb begin
    dout = '0;
    for (int i = 0; i < N; i++)
      if (en[i]) dout |= din[i];
  end

  // Two drivers on one bus is a contention in the tri-state original.
  a_one_driver: assert property (@(posedge clk) $onehot0(en))
    else $error("arc_bus: more than one driver enabled (%b)", en);

endmodule
