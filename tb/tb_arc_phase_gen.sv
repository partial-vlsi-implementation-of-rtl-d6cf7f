// tb_arc_phase_gen: checks that the phase counter runs 0,1,2,3 from reset
// and that tick is high exactly in phase 3, one cycle in four.
module tb_arc_phase_gen;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [1:0] phase;
  logic       tick;
  int checks = 0, failures = 0, ticks = 0;

  arc_phase_gen dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      checks++;
      if (phase !== 2'(i + 1) || tick !== (2'(i + 1) == 2'd3)) begin
        failures++; $display("FAIL cycle %0d phase %0d tick %b", i, phase, tick);
      end
      if (tick) ticks++;
      @(posedge clk);
    end
    checks++;
    if (ticks != 100) begin failures++; $display("FAIL ticks %0d", ticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
