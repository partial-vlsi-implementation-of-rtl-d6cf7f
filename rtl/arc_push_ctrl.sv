// arc_push_ctrl: control units of the PUSH, PUSHL and PUSHI instructions.
//
// Each instruction has its own counter-and-decoder unit
// (arc_tstate_counter). The unit is held clear until its instruction
// signal rises in T3, then steps once per T-state. Its decoder outputs are
// mapped onto named T-states:
//
//   PUSH   T10 T11 T25 T12 T13 T25                   (6 states, 3-bit counter)
//   PUSHL  T15 T27 T10 T19 T13 T25                   (6 states, 3-bit counter)
//   PUSHI  T26 T27 T29 T30 T27 T10 T25 T23 T13 T25   (10 states, 4-bit counter)
//
// With the fetch states T1 and T2, an instruction takes 8, 8 and 12 T-states.
// PUSHL's T27 and PUSHI's second T27 are memory reads that repeat while the
// busy bit is set. bb is the most significant bit of the word being read.
// It is sampled at the step edge that ends the T27. If it is 1 the counter
// holds and T27 runs again. If it is 0 the unit moves on. fin is high in
// the last state of the running unit.
//
// The sequences, the state counts and the busy-bit repeat follow the
// original design. The counter widths are this design's choice, as is the
// mapping of decoder outputs to states. T10, T25, T26 and T27 are the same
// transfers as in ADD/SUB and DTS. The transfers of T11, T12, T13, T15,
// T19, T23, T29 and T30 are not defined here. Those states come out on
// ts_open and move no data inside the processor.
//
// Timing: adv is the one-cycle tick at the end of each T-state. All outputs
// are combinational from the counters and the ins_* inputs.
module arc_push_ctrl
  import arc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          adv,
  input  logic          ins_push,
  input  logic          ins_pushl,
  input  logic          ins_pushi,
  input  logic          bb,
  output logic          t10,
  output logic          t25,
  output logic          t26,
  output logic          t27,
  output tstates_open_t ts_open,
  output logic          fin
);

  logic [2:0]  p_cnt, l_cnt;
  logic [3:0]  i_cnt;
  logic [7:0]  p_ts, l_ts;
  logic [15:0] i_ts;
  logic        l_hold, i_hold;

  assign l_hold = l_ts[1] & bb;
  assign i_hold = i_ts[4] & bb;

  arc_tstate_counter #(.CW(3)) u_push (
    .clk  (clk),
    .rst_n(rst_n),
    .ins  (ins_push),
    .adv  (adv),
    .hold (1'b0),
    .count(p_cnt),
    .ts   (p_ts)
  );

  arc_tstate_counter #(.CW(3)) u_pushl (
    .clk  (clk),
    .rst_n(rst_n),
    .ins  (ins_pushl),
    .adv  (adv),
    .hold (l_hold),
    .count(l_cnt),
    .ts   (l_ts)
  );

  arc_tstate_counter #(.CW(4)) u_pushi (
    .clk  (clk),
    .rst_n(rst_n),
    .ins  (ins_pushi),
    .adv  (adv),
    .hold (i_hold),
    .count(i_cnt),
    .ts   (i_ts)
  );

  assign t10 = p_ts[0] | l_ts[2] | i_ts[5];
  assign t25 = p_ts[2] | p_ts[5] | l_ts[5] | i_ts[6] | i_ts[9];
  assign t26 = i_ts[0];
  assign t27 = l_ts[1] | i_ts[1] | i_ts[4];

  always_comb begin
    ts_open     = '0;
    ts_open.t11 = p_ts[1];
    ts_open.t12 = p_ts[3];
    ts_open.t13 = p_ts[4] | l_ts[4] | i_ts[8];
    ts_open.t15 = l_ts[0];
    ts_open.t19 = l_ts[3];
    ts_open.t23 = i_ts[7];
    ts_open.t29 = i_ts[2];
    ts_open.t30 = i_ts[3];
  end

  assign fin = p_ts[5] | l_ts[5] | i_ts[9];

endmodule
