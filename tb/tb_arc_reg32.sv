// tb_arc_reg32: self-checking test of the parallel load/read register.
// Random loads, holds, output enables and asynchronous clears are applied
// and compared with a reference copy of the register kept here.
module tb_arc_reg32;
  logic        clk = 1'b0, rst_n = 1'b0, ld = 1'b0, en = 1'b0;
  logic [31:0] d = '0, q, bus_out, ref_q;
  int checks = 0, failures = 0;

  arc_reg32 #(.WIDTH(32), .RESET_VALUE(32'h0)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ld = 1'($urandom); en = 1'($urandom); d = $urandom;
      if ($urandom_range(0, 50) == 0) begin
        rst_n = 1'b0; #1;
        ref_q = '0;
        checks++; if (q !== 32'h0) begin failures++; $display("FAIL clear"); end
        rst_n = 1'b1;
      end
      #1;
      checks++;
      if (bus_out !== (en ? ref_q : 32'h0)) begin
        failures++; $display("FAIL bus_out %h en %b ref %h", bus_out, en, ref_q);
      end
      @(posedge clk);
      if (ld) ref_q = d;
      #1;
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL q %h ref %h", q, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
