// tb_arc_tstate_decode: checks the control lines produced for each named
// T-state in each of the four phases against the transfer it stands for
// (sources, ALU operation, destinations) and the phase rules: ALU buffer
// load in phase 1, destination bus in phases 2-3, register loads and the
// memory write in phase 3, IR load in phase 1 of T2.
module tb_arc_tstate_decode;
  import arc_pkg::*;

  tstates_t   ts;
  logic [1:0] phase;
  dp_ctrl_t   ctrl;
  int checks = 0, failures = 0;

  arc_tstate_decode dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Expected transfer of one T-state: S1 source (register index, 9 =
  // memory, -1 none), S2 source (0-2 regs, 3 imm, 4 memory, -1 none),
  // subtract, destination set, memory write.
  task automatic one(input string nm, input tstates_t t, input int s1, input int s2,
                     input bit sb, input logic [NREGS-1:0] dst, input bit wr);
    for (int p = 0; p < 4; p++) begin
      logic [8:0] e1;
      logic [2:0] e2;
      ts = t; phase = 2'(p);
      #1;
      e1 = (s1 >= 0 && s1 < 9) ? 9'(1 << s1) : '0;
      e2 = (s2 >= 0 && s2 < 3) ? 3'(1 << s2) : '0;
      chk(ctrl.s1_en == e1 && ctrl.s1_mem == (s1 == 9), {nm, " S1"});
      chk(ctrl.s2_en == e2 && ctrl.s2_ir == (s2 == 3) && ctrl.s2_mem == (s2 == 4), {nm, " S2"});
      chk(ctrl.alu_sub == sb, {nm, " ALU op"});
      chk(ctrl.alubuf_ld == (p == 1), {nm, " ALU buffer load"});
      chk(ctrl.tdbus == (p >= 2), {nm, " D bus"});
      chk(ctrl.d_ld == ((p == 3) ? dst : '0), $sformatf("%s loads %b phase %0d", nm, ctrl.d_ld, p));
      chk(ctrl.mem_we == (wr && p == 3) && ctrl.mem_rd == !wr, {nm, " memory"});
      chk(ctrl.ir_ld == (t.t2 && p == 1), {nm, " IR load"});
      chk(ctrl.flag_upd == ((t.t17 || t.t18) && p == 1), {nm, " flag"});
    end
  endtask

  function automatic logic [NREGS-1:0] r(int a, int b = -1);
    logic [NREGS-1:0] v = '0;
    v[a] = 1'b1;
    if (b >= 0) v[b] = 1'b1;
    return v;
  endfunction

  initial begin
    tstates_t t;
    t = '0; t.t1  = 1; one("T1",  t, R_PC,     -1,        0, r(R_MAR), 0);
    t = '0; t.t2  = 1; one("T2",  t, R_PC,     R2_OFFSET, 0, r(R_PC), 0);
    t = '0; t.t26 = 1; one("T26", t, R_TOPLDS, -1,        0, r(R_MAR), 0);
    t = '0; t.t27 = 1; one("T27", t, 9,        -1,        0, r(R_MDR), 0);
    t = '0; t.t16 = 1; one("T16", t, R_MAR,    3,         0, r(R_MAR), 0);
    t = '0; t.t17 = 1; one("T17", t, R_MDR,    4,         0, r(R_MDR), 0);
    t = '0; t.t18 = 1; one("T18", t, R_MDR,    4,         1, r(R_MDR), 0);
    t = '0; t.t10 = 1; one("T10", t, R_TOPLDS, 3,         0, r(R_MAR, R_TOPLDS), 0);
    t = '0; t.t14 = 1; one("T14", t, R_PC,     3,         0, r(R_PC), 0);
    t = '0; t.t25 = 1; one("T25", t, R_MDR,    -1,        0, '0, 1);
    // No T-state: nothing moves; the memory bus rests in the read direction.
    ts = '0;
    for (int p = 0; p < 4; p++) begin
      dp_ctrl_t idle;
      idle = '0;
      idle.mem_rd = 1'b1;
      phase = 2'(p); #1;
      chk(ctrl == idle, "idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
