// arc_main_ctrl: Cu1, the main control unit of the ARC.
//
// A two-flip-flop state machine (G1, G2) with states T0 = 00 (idle),
// T1 = 01, T2 = 10 (instruction fetch) and T3 = 11 (execution handed to
// Cu2). Each flip-flop's next value comes from a four-input multiplexer
// selected by the present state {G1, G2}:
//   G1 next: T0 -> 0,  T1 -> 1,  T2 -> X,           T3 -> ~FIN
//   G2 next: T0 -> S,  T1 -> 0,  T2 -> X | ~X & Y,  T3 -> 1
// So T0 waits for the start signal S; T1 always goes to T2; from T2 an
// instruction that needs execution states (X = 1) enters T3, one that does
// not goes back to T1 to fetch the next instruction when IR bit 5 (Y) is
// set, or to T0 when it is clear; T3 holds until FIN and then goes to T1.
// The state table and multiplexer inputs are those of the original; the
// 2-to-4 decoder gives the one-hot outputs t[0..3].
//
// X is an input: here it comes from the opcode decoder of Cu2 (high for an
// instruction that has states after T2) instead of being a gate on IR bits
// 0-4, so that an untaken conditional branch also skips T3.
//
// Timing: the state changes on a rising clk edge when ce is high (the last
// phase of each T-state); S, X, Y and FIN are sampled on that edge.
// rst_n (active low, asynchronous) returns the unit to T0.
module arc_main_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       s,
  input  logic       x,
  input  logic       y,
  input  logic       fin,
  output logic [3:0] t
);

  logic g1, g2;
  logic mux1, mux2;

  always_comb begin
    unique case ({g1, g2})
      2'b00: begin mux1 = 1'b0; mux2 = s;                end
      2'b01: begin mux1 = 1'b1; mux2 = 1'b0;             end
      2'b10: begin mux1 = x;    mux2 = x | (~x & y);     end
      2'b11: begin mux1 = ~fin; mux2 = 1'b1;             end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g1 <= 1'b0;
      g2 <= 1'b0;
    end else if (ce) begin
      g1 <= mux1;
      g2 <= mux2;
    end
  end

  always_comb begin
    t = '0;
    t[{g1, g2}] = 1'b1;
  end

endmodule
