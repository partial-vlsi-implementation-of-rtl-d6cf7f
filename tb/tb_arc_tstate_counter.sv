// tb_arc_tstate_counter: self-checking test of the counter and decoder of
// an instruction control unit. With ins low all outputs are low and the
// counter is clear; when ins rises ts[0] is high at once, each adv steps
// to the next output, and hold keeps the present one.
module tb_arc_tstate_counter;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       ins = 1'b0, adv = 1'b0, hold = 1'b0;
  logic [2:0] count;
  logic [7:0] ts;
  int         expc;
  int checks = 0, failures = 0, holds = 0;

  arc_tstate_counter #(.CW(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expc = 0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 15) == 0) ins = ~ins;
      adv = 1'($urandom); hold = ($urandom_range(0, 4) == 0);
      #1;
      checks++;
      if (ts !== (ins ? 8'(1 << expc) : 8'h00)) begin
        failures++; $display("FAIL ins=%b ts=%b expected count %0d", ins, ts, expc);
      end
      @(posedge clk);
      if (!ins) expc = 0;
      else if (adv && !hold) expc = (expc + 1) % 8;
      else if (adv && hold) holds++;
    end
    checks++;
    if (holds == 0) begin failures++; $display("FAIL hold never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
