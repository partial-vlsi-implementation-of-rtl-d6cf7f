// tb_arc_bus: self-checking test of a datapath bus. With one or no source
// enabled, the bus must carry that source's value, or zero.
module tb_arc_bus;
  localparam int N = 5;
  logic               clk = 1'b0;
  logic [N-1:0]       en = '0;
  logic [N-1:0][31:0] din;
  logic [31:0]        dout;
  int checks = 0, failures = 0;

  arc_bus #(.N(N), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) din[k] = $urandom;
      en = '0;
      if (i % 6 != 0) en[$urandom_range(0, N-1)] = 1'b1;
      #1;
      checks++;
      if (en == '0) begin
        if (dout !== 32'h0) begin failures++; $display("FAIL idle bus %h", dout); end
      end else begin
        for (int k = 0; k < N; k++)
          if (en[k] && dout !== din[k]) begin
            failures++; $display("FAIL src %0d: %h vs %h", k, dout, din[k]);
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
