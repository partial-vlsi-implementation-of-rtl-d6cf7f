// tb_arc_mem_bank: writes random words to random addresses of a memory
// bank and reads them back against a reference array kept here.
module tb_arc_mem_bank;
  localparam int WORDS = 4096;
  logic        clk = 1'b0, we = 1'b0;
  logic [11:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] refm [WORDS];
  bit          valid [WORDS];
  int checks = 0, failures = 0;

  arc_mem_bank #(.WORDS(WORDS), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      addr = 12'($urandom_range(0, 255));
      we = 1'($urandom);
      wdata = $urandom;
      #1;
      if (!we && valid[addr]) begin
        checks++;
        if (rdata !== refm[addr]) begin failures++; $display("FAIL %h: %h vs %h", addr, rdata, refm[addr]); end
      end
      @(posedge clk);
      if (we) begin refm[addr] = wdata; valid[addr] = 1'b1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
