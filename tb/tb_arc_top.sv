// tb_arc_top: end-to-end test of the ARC processor slice at its default
// sizes (4K-word InsM and LDS, 64K-word IM and FM).
//
// A host loads a program into instruction memory and two random operands
// into the local data stack through the external memory port, pulses
// start, and lets the processor run until it returns to T0 (WAIT), then
// restarts it until END. The program exercises every implemented
// instruction and every control path: NOP (fetch continues), ADD and SUB
// with the carry out, DTS, BRANCH, BRTRUE and BRFALSE both taken and not
// taken, and WAIT/END halting with a restart. The expected stack contents
// and program counter are worked out here from the operands; the number
// of T-states each instruction takes is checked against the counts of
// the original design (2 for NOP/WAIT/END and untaken branches, 3 for a
// taken branch, 6 for DTS, 8 for ADD/SUB), at four clock cycles each.
//
// A third run executes PUSH, PUSHI and PUSHL. Only their states T10, T25,
// T26 and T27 move data, so the test checks those effects, the full state
// counts (8, 12 and 8 T-states) and the busy-bit repeat. PUSHI's second
// T27 reads a stack word whose bit 31 is set. The processor must keep
// repeating that read until the host clears the word, and must then go on.
// Each of the states brought out on ts_open must be seen.
module tb_arc_top;
  import arc_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic        ext_en = 1'b0, ext_we = 1'b0;
  logic [31:0] ext_addr = '0, ext_wdata = '0, ext_rdata;
  logic [3:0]  t_state;
  logic [1:0]  phase;
  logic [31:0] ir;
  logic [NREGS-1:0][31:0] regs;
  logic        ovflo, busy, cr;
  tstates_open_t ts_open;

  int checks = 0, failures = 0;

  arc_top dut (.*);

  always #5 clk = ~clk;

  localparam logic [31:0] INSM = 32'h0000_0000;
  localparam logic [31:0] LDS  = 32'h4000_0000;

  function automatic logic [31:0] instr(opcode_e op, int imm);
    return {imm[25:0], op};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic mem_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    ext_en = 1'b1; ext_we = 1'b1; ext_addr = a; ext_wdata = d;
    @(negedge clk);
    ext_we = 1'b0; ext_en = 1'b0;
  endtask

  task automatic mem_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    ext_en = 1'b1; ext_addr = a;
    #1 d = ext_rdata;
    @(negedge clk);
    ext_en = 1'b0;
  endtask

  // Mechanism counters.
  int n_nop = 0, n_add = 0, n_sub = 0, n_dts = 0, n_br = 0;
  int n_brt_take = 0, n_brt_skip = 0, n_brf_take = 0, n_brf_skip = 0;
  int n_halt = 0, n_t3 = 0, n_carry = 0, n_zero = 0;
  int n_push = 0, n_pushl = 0, n_pushi = 0, n_busy_rep = 0;
  tstates_open_t open_seen = '0;
  int          t27cnt;

  // T-state accounting: count T-states from each T1 to the next T1 or T0.
  int          tcount;
  bit          in_instr = 0;
  int          inst_cycles;

  function automatic int expected_tstates(logic [31:0] i, logic c, int n27);
    case (opcode_e'(i[5:0]))
      OP_PUSH:        return 8;
      OP_PUSHL:       return 8 + (n27 - 1);   // one more per busy repeat
      OP_PUSHI:       return 12 + (n27 - 2);
      OP_ADD, OP_SUB: return 8;
      OP_DTS:         return 6;
      OP_BRANCH:      return 3;
      OP_BRTRUE:      return c ? 3 : 2;
      OP_BRFALSE:     return c ? 2 : 3;
      default:        return 2;
    endcase
  endfunction

  logic cr_at_t2;
  always @(posedge clk) begin
    if (rst_n && phase == 2'd3) begin
      if (t_state[2]) cr_at_t2 <= cr;
      if (t_state[3]) n_t3 <= n_t3 + 1;
    end
  end

  // At the end of each T-state: close the previous instruction when a new
  // one starts (T1) or the processor halts (T0 reached from T2).
  logic [3:0] t_prev;
  always @(posedge clk) begin
    if (rst_n && phase != 2'd0) inst_cycles <= inst_cycles + 1;
    if (rst_n && phase == 2'd0) begin
      t_prev <= t_state;
      inst_cycles <= inst_cycles + 1;
      if (in_instr && (t_state[1] || t_state[0]) && !t_prev[0]) begin
        check(tcount == expected_tstates(ir, cr_at_t2, t27cnt),
              $sformatf("op %02h took %0d T-states", ir[5:0], tcount));
        check(inst_cycles == 4 * tcount,
              $sformatf("%0d clocks for %0d T-states", inst_cycles, tcount));
        case (opcode_e'(ir[5:0]))
          OP_NOP:     n_nop++;
          OP_ADD:     n_add++;
          OP_SUB:     n_sub++;
          OP_DTS:     n_dts++;
          OP_BRANCH:  n_br++;
          OP_BRTRUE:  if (tcount == 3) n_brt_take++; else n_brt_skip++;
          OP_BRFALSE: if (tcount == 3) n_brf_take++; else n_brf_skip++;
          OP_WAIT, OP_END: n_halt++;
          OP_PUSH:    n_push++;
          OP_PUSHL:   n_pushl++;
          OP_PUSHI:   begin n_pushi++; n_busy_rep += t27cnt - 2; end
          default: ;
        endcase
      end
      open_seen <= open_seen | ts_open;
      if (t_state[1]) t27cnt <= 0;
      else if (dut.ts.t27) t27cnt <= t27cnt + 1;
      if (t_state[1]) begin
        in_instr <= 1'b1;
        tcount <= 1;
        inst_cycles <= 1;
      end else if (t_state[0]) begin
        in_instr <= 1'b0;
      end else begin
        tcount <= tcount + 1;
      end
    end
  end

  always @(posedge clk) begin
    if (dut.ctrl.alubuf_ld && (dut.ts.t17 || dut.ts.t18)) begin
      if (ovflo && dut.ts.t17) n_carry++;
      if (dut.u_dp.alu_z) n_zero++;
    end
  end

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] a, b, c, rd, sum;
  int pc_end;
  logic [31:0] prog [$];

  task automatic run_until_t0();
    start = 1'b1;
    wait (!t_state[0]);
    @(negedge clk);
    start = 1'b0;
    wait (t_state[0]);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    a = $urandom | 32'h8000_0000;   // large enough that a + b carries
    b = $urandom | 32'h8000_0000;
    c = $urandom & 32'h7fff_ffff;   // not busy
    sum = a + b;

    prog = '{
      instr(OP_NOP, 0),
      instr(OP_ADD, 1),       // L1 = a + b (carry out), top = L1
      instr(OP_DTS, 1),       // L2 = a + b, top = L2
      instr(OP_SUB, -1),      // L1 = L2 - L1 = 0 (Z), top = L1
      instr(OP_BRTRUE, 1),    // CR = 1: taken, skips the END
      instr(OP_END, 0),
      instr(OP_BRFALSE, 5),   // CR = 1: not taken
      instr(OP_BRANCH, 1),    // skips the END
      instr(OP_END, 0),
      instr(OP_ADD, -1),      // L0 = L1 + L0 = a, top = L0, CR = 0
      instr(OP_BRTRUE, 3),    // not taken
      instr(OP_BRFALSE, 1),   // taken, skips the END
      instr(OP_END, 0),
      instr(OP_WAIT, 0),      // halt; restarted by the host
      instr(OP_NOP, 0),
      instr(OP_END, 0),
      instr(OP_PUSH, 1),      // top = L1, L1 <- MDR (= a, busy bit set)
      instr(OP_PUSHI, 1),     // reads L1 until not busy; top = L2, L2 <- L1
      instr(OP_PUSHL, 1),     // reads its own word; top = L3, L3 <- that word
      instr(OP_END, 0)
    };
    pc_end = 16;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (prog[i]) mem_write(INSM + i, prog[i]);
    mem_write(LDS + 0, a);
    mem_write(LDS + 1, b);
    mem_write(LDS + 2, 32'hdead_beef);

    check(t_state == 4'b0001, "idle in T0 before start");
    repeat (10) @(negedge clk);
    check(t_state == 4'b0001, "stays in T0 without start");

    run_until_t0();
    check(regs[R_PC] == 32'd14, $sformatf("PC after WAIT = %0d", regs[R_PC]));
    check(regs[R_TOPLDS] == LDS, "TopLDS back at L0");
    run_until_t0();
    check(regs[R_PC] == 32'(pc_end), $sformatf("PC after END = %0d", regs[R_PC]));

    mem_read(LDS + 0, rd);
    check(rd == a, $sformatf("L0 = %h, expected %h", rd, a));
    mem_read(LDS + 1, rd);
    check(rd == 32'd0, $sformatf("L1 = %h, expected 0", rd));
    mem_read(LDS + 2, rd);
    check(rd == sum, $sformatf("L2 = %h, expected %h", rd, sum));
    check(cr == 1'b0, "CR clear after the last ADD");

    // Every mechanism happened.
    check(n_nop == 2, $sformatf("NOP count %0d", n_nop));
    check(n_add == 2, $sformatf("ADD count %0d", n_add));
    check(n_sub == 1, "SUB executed");
    check(n_dts == 1, "DTS executed");
    check(n_br == 1, "BRANCH executed");
    check(n_brt_take == 1 && n_brt_skip == 1, "BRTRUE taken and not taken");
    check(n_brf_take == 1 && n_brf_skip == 1, "BRFALSE taken and not taken");
    check(n_halt == 2, "WAIT and END halted");
    check(n_t3 > 0, "T3 entered");
    check(n_carry > 0, "carry out seen");
    check(n_zero > 0, "zero result seen");
    // Third run: the PUSH group, with a busy read that the host releases.
    start = 1'b1;
    wait (!t_state[0]);
    @(negedge clk);
    start = 1'b0;
    wait (ts_open.t30);          // PUSHI: next state is its looping T27
    repeat (4 * 5) @(negedge clk);
    check(dut.ts.t27 && opcode_e'(ir[5:0]) == OP_PUSHI, "PUSHI held in T27 while busy");
    while (phase != 2'd0) @(negedge clk);
    mem_write(LDS + 1, c);       // written in phase 0, when nothing latches
    wait (t_state[0]);
    repeat (4) @(negedge clk);
    check(regs[R_PC] == 32'(prog.size()), $sformatf("PC after third END = %0d", regs[R_PC]));
    check(regs[R_TOPLDS] == LDS + 3, $sformatf("TopLDS = %h", regs[R_TOPLDS]));
    mem_read(LDS + 1, rd);
    check(rd == c, $sformatf("L1 = %h, expected %h", rd, c));
    mem_read(LDS + 2, rd);
    check(rd == c, $sformatf("L2 = %h, expected %h (PUSHI)", rd, c));
    mem_read(LDS + 3, rd);
    check(rd == instr(OP_PUSHL, 1), $sformatf("L3 = %h (PUSHL)", rd));
    check(n_push == 1 && n_pushl == 1 && n_pushi == 1, "PUSH, PUSHL, PUSHI executed");
    check(n_busy_rep >= 5, $sformatf("busy repeats %0d", n_busy_rep));
    check(open_seen == '1, $sformatf("open states seen %b", open_seen));

    $display("mechanisms: nop=%0d add=%0d sub=%0d dts=%0d br=%0d brt=%0d/%0d brf=%0d/%0d halt=%0d t3=%0d carry=%0d zero=%0d",
             n_nop, n_add, n_sub, n_dts, n_br, n_brt_take, n_brt_skip, n_brf_take, n_brf_skip,
             n_halt, n_t3, n_carry, n_zero);
    $display("push=%0d pushl=%0d pushi=%0d busy_repeats=%0d", n_push, n_pushl, n_pushi, n_busy_rep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
