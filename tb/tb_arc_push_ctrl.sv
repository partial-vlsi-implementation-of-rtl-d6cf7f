// tb_arc_push_ctrl: checks the PUSH, PUSHL and PUSHI control units.
//
// Each run starts one of the three units, then steps it once per simulated
// T-state (adv pulses) with a random busy bit bb on every step. A reference
// walks the instruction's state list (PUSH T10 T11 T25 T12 T13 T25, PUSHL
// T15 T27 T10 T19 T13 T25, PUSHI T26 T27 T29 T30 T27 T10 T25 T23 T13 T25).
// The reference stays put when bb is high in a looping T27: PUSHL's only
// T27 and PUSHI's second. After every step the one active state line of
// the unit must be the one the reference names. fin must be high exactly
// in the last state. While no instruction signal is high, every output
// must be low.
module tb_arc_push_ctrl;
  import arc_pkg::*;

  logic          clk = 1'b0, rst_n = 1'b0, adv = 1'b0, bb = 1'b0;
  logic          ins_push = 1'b0, ins_pushl = 1'b0, ins_pushi = 1'b0;
  logic          t10, t25, t26, t27, fin;
  tstates_open_t ts_open;
  int checks = 0, failures = 0;
  int n_holds = 0;

  arc_push_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Name of the single active output, "-" for none, "MULTI" for several.
  function automatic string active();
    string n;
    int k;
    k = 0; n = "-";
    if (t10)         begin k++; n = "T10"; end
    if (t25)         begin k++; n = "T25"; end
    if (t26)         begin k++; n = "T26"; end
    if (t27)         begin k++; n = "T27"; end
    if (ts_open.t11) begin k++; n = "T11"; end
    if (ts_open.t12) begin k++; n = "T12"; end
    if (ts_open.t13) begin k++; n = "T13"; end
    if (ts_open.t15) begin k++; n = "T15"; end
    if (ts_open.t19) begin k++; n = "T19"; end
    if (ts_open.t23) begin k++; n = "T23"; end
    if (ts_open.t29) begin k++; n = "T29"; end
    if (ts_open.t30) begin k++; n = "T30"; end
    return (k > 1) ? "MULTI" : n;
  endfunction

  task automatic run(input int which);
    string seq[$];
    int    loop_at;
    int    idx;
    int    guard;
    case (which)
      0: begin seq = '{"T10", "T11", "T25", "T12", "T13", "T25"}; loop_at = -1; end
      1: begin seq = '{"T15", "T27", "T10", "T19", "T13", "T25"}; loop_at = 1; end
      default: begin
        seq = '{"T26", "T27", "T29", "T30", "T27", "T10", "T25", "T23", "T13", "T25"};
        loop_at = 4;
      end
    endcase
    @(negedge clk);
    ins_push  = (which == 0);
    ins_pushl = (which == 1);
    ins_pushi = (which == 2);
    idx = 0;
    guard = 0;
    forever begin
      #1;
      checks++;
      if (active() != seq[idx] || fin !== (idx == seq.size() - 1)) begin
        failures++;
        $display("FAIL unit %0d step %0d: %s fin=%b, expected %s", which, idx, active(), fin, seq[idx]);
      end
      if (idx == seq.size() - 1 || ++guard > 100) break;
      bb = 1'($urandom_range(0, 2) != 0);   // busy two times in three
      adv = 1'b1;
      @(negedge clk);
      adv = 1'b0;
      if (idx == loop_at && bb) n_holds++;
      else idx++;
      bb = 1'($urandom_range(0, 1));
      // a T-state has more cycles than its step edge: no step, no change
      @(negedge clk);
      bb = 1'b0;
    end
    ins_push = 1'b0; ins_pushl = 1'b0; ins_pushi = 1'b0;
    #1 checks++;
    if (active() != "-" || fin) begin
      failures++; $display("FAIL outputs active with no instruction signal");
    end
  endtask

  initial begin
    #12 rst_n = 1'b1;
    for (int i = 0; i < 300; i++) run(int'($urandom_range(0, 2)));
    checks++;
    if (n_holds == 0) begin
      failures++; $display("FAIL busy repeat never happened");
    end
    $display("busy repeats: %0d", n_holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
