// tb_arc_addsub_ctrl: checks the ADD/SUB control unit. For each run the
// unit is started (ins high) and advanced one T-state per adv pulse; the
// sequence of active T-states must be T26, T27, T16, T17 (ADD) or T18
// (SUB), T10, T25, with exactly one active at a time and fin only in
// T25, i.e. six T-states. Random gaps between adv pulses model the four
// phases of a T-state.
module tb_arc_addsub_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ins = 1'b0, sub = 1'b0, adv = 1'b0;
  logic t26, t27, t16, t17, t18, t10, t25, fin;
  int checks = 0, failures = 0;

  arc_addsub_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] expect_vec(int k, logic s);
    // order: t26 t27 t16 t17 t18 t10 t25
    case (k)
      0: return 7'b1000000;
      1: return 7'b0100000;
      2: return 7'b0010000;
      3: return s ? 7'b0000100 : 7'b0001000;
      4: return 7'b0000010;
      5: return 7'b0000001;
      default: return 7'b0;
    endcase
  endfunction

  initial begin
    int steps;
    #12 rst_n = 1'b1;
    for (int run = 0; run < 40; run++) begin
      @(negedge clk);
      sub = 1'($urandom);
      ins = 1'b1;
      steps = 0;
      for (int k = 0; k < 6; k++) begin
        repeat ($urandom_range(0, 3)) begin
          @(negedge clk); adv = 1'b0;
          #1 checks++;
          if ({t26, t27, t16, t17, t18, t10, t25} !== expect_vec(k, sub)) begin
            failures++; $display("FAIL run %0d state %0d hold", run, k);
          end
        end
        #1 checks++;
        if ({t26, t27, t16, t17, t18, t10, t25} !== expect_vec(k, sub) || fin !== (k == 5)) begin
          failures++; $display("FAIL run %0d state %0d: %b fin %b", run, k, {t26, t27, t16, t17, t18, t10, t25}, fin);
        end
        steps++;
        adv = 1'b1;
        @(negedge clk);
        adv = 1'b0;
      end
      ins = 1'b0;
      #1 checks++;
      if ({t26, t27, t16, t17, t18, t10, t25, fin} !== 8'b0 || steps != 6) begin
        failures++; $display("FAIL run %0d not idle after ins drops", run);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
