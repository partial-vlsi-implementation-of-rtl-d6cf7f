// arc_tstate_decode: from T-states to the ARC datapath control lines.
//
// Each active T-state line is combined with the four-phase timing to give
// the control lines of the datapath and memory for one clock cycle:
//   phases 0-3  the source registers named by the T-state drive S1/S2 and
//               the ALU operation is held;
//   phase 1     the ALU output buffer loads (and C_flag takes the ALU
//               flags for an ADD/SUB result);
//   phases 2-3  the ALU output buffer drives the destination bus;
//   phase 3     the destination registers load, or memory is written.
// The IR loads from memory in phase 1 of T2, so that the opcode is
// decoded before Cu1 leaves T2.
// The transfers of each T-state are listed in arc_pkg. The memory bus is
// in the read direction except during T25. Combinational.
module arc_tstate_decode
  import arc_pkg::*;
(
  input  tstates_t   ts,
  input  logic [1:0] phase,
  output dp_ctrl_t   ctrl
);

  logic [NREGS-1:0] dest;   // registers loaded at the end of the T-state
  logic             any_ts;
  logic             to_mem;

  always_comb begin
    ctrl = '0;
    dest = '0;

    if (ts.t1)  begin ctrl.s1_en[R_PC] = 1'b1;                           dest[R_MAR] = 1'b1; end
    if (ts.t2)  begin ctrl.s1_en[R_PC] = 1'b1; ctrl.s2_en[R2_OFFSET] = 1'b1; dest[R_PC] = 1'b1; end
    if (ts.t26) begin ctrl.s1_en[R_TOPLDS] = 1'b1;                       dest[R_MAR] = 1'b1; end
    if (ts.t27) begin ctrl.s1_mem = 1'b1;                                dest[R_MDR] = 1'b1; end
    if (ts.t16) begin ctrl.s1_en[R_MAR] = 1'b1; ctrl.s2_ir = 1'b1;       dest[R_MAR] = 1'b1; end
    if (ts.t17) begin ctrl.s1_en[R_MDR] = 1'b1; ctrl.s2_mem = 1'b1;      dest[R_MDR] = 1'b1; end
    if (ts.t18) begin ctrl.s1_en[R_MDR] = 1'b1; ctrl.s2_mem = 1'b1;      dest[R_MDR] = 1'b1;
                      ctrl.alu_sub = 1'b1; end
    if (ts.t10) begin ctrl.s1_en[R_TOPLDS] = 1'b1; ctrl.s2_ir = 1'b1;
                      dest[R_MAR] = 1'b1; dest[R_TOPLDS] = 1'b1; end
    if (ts.t14) begin ctrl.s1_en[R_PC] = 1'b1; ctrl.s2_ir = 1'b1;        dest[R_PC] = 1'b1; end
    if (ts.t25) begin ctrl.s1_en[R_MDR] = 1'b1; end

    any_ts = |ts;
    to_mem = ts.t25;

    ctrl.alubuf_ld = any_ts && (phase == 2'd1);
    ctrl.flag_upd  = (ts.t17 | ts.t18) && (phase == 2'd1);
    ctrl.tdbus     = any_ts && (phase inside {2'd2, 2'd3});
    ctrl.d_ld      = (phase == 2'd3) ? dest : '0;
    ctrl.mem_rd    = !to_mem;
    ctrl.mem_we    = to_mem && (phase == 2'd3);
    ctrl.ir_ld     = ts.t2 && (phase == 2'd1);
  end

endmodule
