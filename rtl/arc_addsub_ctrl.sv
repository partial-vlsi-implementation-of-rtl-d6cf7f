// arc_addsub_ctrl: control unit of the ARC ADD and SUB instructions.
//
// ADD and SUB take six T-states after the fetch (eight in all). They pop
// the two top entries of the local data stack (LDS) and push the result:
//   T26  MAR <- TopLDS
//   T27  MDR <- M[MAR]                first operand
//   T16  MAR <- MAR + imm             address of the second operand
//   T17  MDR <- MDR + M[MAR]          (ADD)  or
//   T18  MDR <- MDR - M[MAR]          (SUB)
//   T10  MAR, TopLDS <- TopLDS + imm  new top of stack
//   T25  M[MAR] <- MDR                result written
// where imm is the instruction's operand field (normally -1). One unit
// serves both instructions: sub selects T18 in place of T17. A three-bit
// arc_tstate_counter steps through the states, two of its eight decoder
// outputs unused. fin is high during T25, the last state, so the main
// control unit returns to T1 at the end of it.
//
// Timing: ins is high while the main control unit is in T3 with an ADD or
// SUB in the IR; adv is the last-phase tick of each T-state.
module arc_addsub_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic ins,
  input  logic sub,
  input  logic adv,
  output logic t26,
  output logic t27,
  output logic t16,
  output logic t17,
  output logic t18,
  output logic t10,
  output logic t25,
  output logic fin
);

  logic [2:0] count;
  logic [7:0] ts;

  arc_tstate_counter #(.CW(3)) u_cnt (
    .clk  (clk),
    .rst_n(rst_n),
    .ins  (ins),
    .adv  (adv),
    .hold (1'b0),
    .count(count),
    .ts   (ts)
  );

  assign t26 = ts[0];
  assign t27 = ts[1];
  assign t16 = ts[2];
  assign t17 = ts[3] & ~sub;
  assign t18 = ts[3] &  sub;
  assign t10 = ts[4];
  assign t25 = ts[5];
  assign fin = ts[5];

endmodule
