// arc_phase_gen: four-phase timing of an ARC T-state.
//
// Every T-state line of the ARC control is ANDed with a four-phase clock,
// so that one T-state splits into four steps: sources onto the buses and
// ALU settling (phase 0), ALU output buffer load (phase 1), buffer onto
// the destination bus (phase 2) and destination register load (phase 3).
// Here the four phases are four cycles of clk, counted by a two-bit
// counter; tick is high in phase 3 and is the clock enable of the T-state
// state machines, which therefore change state once per T-state. Reset
// (active low, asynchronous) starts at phase 0.
module arc_phase_gen (
  input  logic       clk,
  input  logic       rst_n,
  output logic [1:0] phase,
  output logic       tick
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= 2'd0;
    else        phase <= phase + 2'd1;
  end

  assign tick = (phase == 2'd3);

endmodule
