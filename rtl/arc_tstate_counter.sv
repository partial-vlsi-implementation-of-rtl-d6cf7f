// arc_tstate_counter: core of an ARC instruction control unit.
//
// A CW-bit counter drives a CW-to-2^CW decoder whose one-hot outputs are
// the instruction's successive T-states. While the instruction signal ins
// is low the counter is held clear and the decoder outputs are all low
// (the original gates the counter clock and the decoder inputs with ins).
// When ins rises the first output, ts[0], is high at once; each rising
// clk edge with adv high then steps to the next output. hold high keeps
// the present T-state (a repeated T-state, such as a memory read repeated
// while the busy bit is set). With CW = 3 there are eight T-states, of
// which an instruction uses as many as it needs.
//
// The original builds the counter from JK master-slave flip-flops and
// Karnaugh-reduced next-state logic; here it is a plain binary counter.
module arc_tstate_counter #(
  parameter int unsigned CW = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ins,
  input  logic               adv,
  input  logic               hold,
  output logic [CW-1:0]      count,
  output logic [(1<<CW)-1:0] ts
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             count <= '0;
    else if (!ins)          count <= '0;
    else if (adv && !hold)  count <= count + 1'b1;
  end

  always_comb begin
    ts = '0;
    if (ins) ts[count] = 1'b1;
  end

endmodule
