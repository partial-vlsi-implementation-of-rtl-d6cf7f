// arc_control2: Cu2, the execution control of the ARC.
//
// Cu2 decodes the opcode in IR[5:0] and, while the main control unit
// (Cu1) is in T3, starts the control unit of that instruction. Each unit is
// a counter with a decoder (arc_tstate_counter) whose outputs are named
// T-states; Cu2 ORs them into one set of T-state lines for the T-state
// decoder and raises fin in the last T-state of the running instruction.
//
// Units built here:
//   ADD/SUB   T26 T27 T16 T17|T18 T10 T25   (arc_addsub_ctrl)
//   DTS       T26 T27 T10 T25               duplicate the top of the LDS
//   BRANCH    T14                           PC <- PC + imm
//   BRTRUE, BRFALSE share the BRANCH unit through arc_branch_sel.
//   PUSH, PUSHL, PUSHI                       (arc_push_ctrl)
// The PUSH units step through states whose transfers are not defined in
// this design; those come out on ts_open. bb is the busy bit of the word
// being read, which makes PUSHL and PUSHI repeat their memory read T27.
// x tells Cu1 whether the instruction in the IR has states after T2: it
// is high for ADD, SUB, DTS, BRANCH and the PUSH group, and for a conditional branch that
// is taken. NOP, WAIT, END, an untaken conditional branch and any opcode
// not listed go straight back to T1 or T0, which gives the two-T-state
// count of those instructions.
//
// t1 and t2 are passed through from Cu1 so that tstates carries every
// active T-state. Timing: adv is the last-phase tick; fin is
// combinational from the unit counters.
module arc_control2
  import arc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        adv,
  input  logic [3:0]  t_main,
  input  logic [31:0] ir,
  input  logic        cr,
  input  logic        bb,
  output logic        x,
  output logic        y,
  output logic        fin,
  output tstates_t    tstates,
  output tstates_open_t ts_open
);

  opcode_e op;
  logic    is_add, is_sub, is_dts, is_br, is_brt, is_brf;
  logic    br_take;
  logic    ins_as, ins_dts, ins_br;
  logic    fin_as, fin_dts, fin_br, fin_push;
  logic    is_push, is_pushl, is_pushi;
  logic    pu_t10, pu_t25, pu_t26, pu_t27;
  logic    as_t26, as_t27, as_t16, as_t17, as_t18, as_t10, as_t25;
  logic [1:0] dts_cnt;
  logic [3:0] dts_ts;
  logic [0:0] br_cnt;
  logic [1:0] br_ts;

  assign op     = opcode_e'(ir[5:0]);
  assign is_add = (op == OP_ADD);
  assign is_sub = (op == OP_SUB);
  assign is_dts = (op == OP_DTS);
  assign is_br  = (op == OP_BRANCH);
  assign is_brt = (op == OP_BRTRUE);
  assign is_brf = (op == OP_BRFALSE);
  assign is_push  = (op == OP_PUSH);
  assign is_pushl = (op == OP_PUSHL);
  assign is_pushi = (op == OP_PUSHI);

  arc_branch_sel u_brsel (
    .cr  (cr),
    .ins (is_brf),
    .take(br_take)
  );

  assign x = is_add | is_sub | is_dts | is_br | ((is_brt | is_brf) & br_take)
           | is_push | is_pushl | is_pushi;
  assign y = ir[5];

  assign ins_as  = t_main[3] & (is_add | is_sub);
  assign ins_dts = t_main[3] & is_dts;
  assign ins_br  = t_main[3] & (is_br | is_brt | is_brf);

  arc_addsub_ctrl u_addsub (
    .clk  (clk),
    .rst_n(rst_n),
    .ins  (ins_as),
    .sub  (is_sub),
    .adv  (adv),
    .t26  (as_t26),
    .t27  (as_t27),
    .t16  (as_t16),
    .t17  (as_t17),
    .t18  (as_t18),
    .t10  (as_t10),
    .t25  (as_t25),
    .fin  (fin_as)
  );

  arc_tstate_counter #(.CW(2)) u_dts (
    .clk  (clk),
    .rst_n(rst_n),
    .ins  (ins_dts),
    .adv  (adv),
    .hold (1'b0),
    .count(dts_cnt),
    .ts   (dts_ts)
  );
  assign fin_dts = dts_ts[3];

  arc_tstate_counter #(.CW(1)) u_br (
    .clk  (clk),
    .rst_n(rst_n),
    .ins  (ins_br),
    .adv  (adv),
    .hold (1'b0),
    .count(br_cnt),
    .ts   (br_ts)
  );
  assign fin_br = br_ts[0];

  arc_push_ctrl u_push (
    .clk      (clk),
    .rst_n    (rst_n),
    .adv      (adv),
    .ins_push (t_main[3] & is_push),
    .ins_pushl(t_main[3] & is_pushl),
    .ins_pushi(t_main[3] & is_pushi),
    .bb       (bb),
    .t10      (pu_t10),
    .t25      (pu_t25),
    .t26      (pu_t26),
    .t27      (pu_t27),
    .ts_open  (ts_open),
    .fin      (fin_push)
  );

  assign fin = fin_as | fin_dts | fin_br | fin_push;

  always_comb begin
    tstates     = '0;
    tstates.t1  = t_main[1];
    tstates.t2  = t_main[2];
    tstates.t26 = as_t26 | dts_ts[0] | pu_t26;
    tstates.t27 = as_t27 | dts_ts[1] | pu_t27;
    tstates.t16 = as_t16;
    tstates.t17 = as_t17;
    tstates.t18 = as_t18;
    tstates.t10 = as_t10 | dts_ts[2] | pu_t10;
    tstates.t25 = as_t25 | dts_ts[3] | pu_t25;
    tstates.t14 = br_ts[0];
  end

endmodule
