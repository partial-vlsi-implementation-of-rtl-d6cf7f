// tb_arc_control2: checks Cu2 on its own. The IR is loaded with each
// implemented opcode (and CR set both ways for the conditional branches);
// x must say whether the instruction has states after T2. For those that
// do, t_main is held at T3 and the named T-states are recorded until fin;
// the recorded sequence must be the instruction's: ADD T26 T27 T16 T17
// T10 T25, SUB the same with T18, DTS T26 T27 T10 T25, a (taken) branch
// T14, PUSH T10 T11 T25 T12 T13 T25, PUSHL T15 T27 T10 T19 T13 T25 and
// PUSHI T26 T27 T29 T30 T27 T10 T25 T23 T13 T25. For PUSHL and PUSHI the
// busy bit bb is held high for a chosen number of steps taken in T27. The
// looping T27 must then repeat once per busy step. PUSHI's first T27 must
// not repeat. y must follow IR bit 5.
module tb_arc_control2;
  import arc_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0, adv = 1'b0, cr = 1'b0, bb = 1'b0;
  tstates_open_t ts_open;
  logic [3:0]  t_main = 4'b0001;
  logic [31:0] ir = '0;
  logic        x, y, fin;
  tstates_t    tstates;
  int checks = 0, failures = 0;

  arc_control2 dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string name_of(tstates_t t, tstates_open_t o);
    if (t == '0 && o == '0) return "-";
    if ($countones(t) + $countones(o) != 1) return "MULTI";
    if (o.t11) return "T11";
    if (o.t12) return "T12";
    if (o.t13) return "T13";
    if (o.t15) return "T15";
    if (o.t19) return "T19";
    if (o.t23) return "T23";
    if (o.t29) return "T29";
    if (o.t30) return "T30";
    if (t.t10) return "T10";
    if (t.t14) return "T14";
    if (t.t16) return "T16";
    if (t.t17) return "T17";
    if (t.t18) return "T18";
    if (t.t25) return "T25";
    if (t.t26) return "T26";
    if (t.t27) return "T27";
    return "OTHER";
  endfunction

  task automatic run(input opcode_e op, input logic c, input bit exp_x, input string exp_seq,
                     input int busy_steps = 0);
    string seq;
    int n;
    int busy_left;
    busy_left = busy_steps;
    @(negedge clk);
    ir = {$urandom_range(0, 255) << 6} | 32'(op);
    cr = c;
    t_main = 4'b0100;           // T2: decision
    #1 checks++;
    if (x !== exp_x || y !== ir[5] || tstates.t2 !== 1'b1) begin
      failures++; $display("FAIL %s cr=%b: x=%b y=%b", op.name(), c, x, y);
    end
    if (!exp_x) return;
    @(negedge clk);
    t_main = 4'b1000;           // T3
    seq = "";
    n = 0;
    while (n < 20) begin
      #1;
      seq = {seq, name_of(tstates, ts_open), " "};
      n++;
      if (fin) break;
      bb = tstates.t27 && busy_left > 0;
      if (bb) busy_left--;
      adv = 1'b1; @(negedge clk); adv = 1'b0; bb = 1'b0;
      repeat (2) @(negedge clk);
    end
    adv = 1'b1; @(negedge clk); adv = 1'b0;
    t_main = 4'b0010;
    checks++;
    if (seq != exp_seq) begin
      failures++; $display("FAIL %s: '%s' expected '%s'", op.name(), seq, exp_seq);
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    repeat (5) begin
      run(OP_ADD, 1'b0, 1'b1, "T26 T27 T16 T17 T10 T25 ");
      run(OP_SUB, 1'b1, 1'b1, "T26 T27 T16 T18 T10 T25 ");
      run(OP_DTS, 1'b0, 1'b1, "T26 T27 T10 T25 ");
      run(OP_BRANCH, 1'b0, 1'b1, "T14 ");
      run(OP_BRTRUE, 1'b1, 1'b1, "T14 ");
      run(OP_BRTRUE, 1'b0, 1'b0, "");
      run(OP_BRFALSE, 1'b0, 1'b1, "T14 ");
      run(OP_BRFALSE, 1'b1, 1'b0, "");
      run(OP_NOP, 1'b0, 1'b0, "");
      run(OP_WAIT, 1'b1, 1'b0, "");
      run(OP_END, 1'b0, 1'b0, "");
      run(OP_PUSH, 1'b0, 1'b1, "T10 T11 T25 T12 T13 T25 ");
      run(OP_PUSHL, 1'b1, 1'b1, "T15 T27 T10 T19 T13 T25 ");
      run(OP_PUSHL, 1'b0, 1'b1, "T15 T27 T27 T27 T10 T19 T13 T25 ", 2);
      run(OP_PUSHI, 1'b0, 1'b1, "T26 T27 T29 T30 T27 T10 T25 T23 T13 T25 ");
      run(OP_PUSHI, 1'b1, 1'b1, "T26 T27 T29 T30 T27 T27 T27 T10 T25 T23 T13 T25 ", 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
