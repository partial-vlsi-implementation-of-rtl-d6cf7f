// tb_arc_memory: checks the four-bank memory map. Random words are written
// at random offsets of InsM, LDS, IM and FM (selected by address bits
// 31:30), through the processor port and through the external port, and
// read back through both; the same offset in different banks must hold
// different data, and the external port must take over the buses.
module tb_arc_memory;
  logic        clk = 1'b0;
  logic [31:0] addr = '0, wdata = '0, rdata;
  logic        we = 1'b0;
  logic        ext_en = 1'b0, ext_we = 1'b0;
  logic [31:0] ext_addr = '0, ext_wdata = '0, ext_rdata;
  logic [31:0] refm [logic [31:0]];
  int checks = 0, failures = 0;

  arc_memory dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] mk_addr(int bank, int off);
    return {2'(bank), 30'(off)};
  endfunction

  initial begin
    logic [31:0] a, d;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a = mk_addr($urandom_range(0, 3), $urandom_range(0, 63));
      d = $urandom;
      if (i % 2 == 0) begin
        ext_en = 1'b1; ext_we = 1'b1; ext_addr = a; ext_wdata = d;
        addr = ~a; we = 1'b1; wdata = ~d;   // must be ignored
      end else begin
        ext_en = 1'b0; ext_we = 1'b0; addr = a; we = 1'b1; wdata = d;
      end
      @(posedge clk);
      refm[a] = d;
      @(negedge clk);
      we = 1'b0; ext_we = 1'b0;
      a = mk_addr($urandom_range(0, 3), $urandom_range(0, 63));
      if (refm.exists(a)) begin
        ext_en = 1'($urandom);
        if (ext_en) ext_addr = a; else addr = a;
        #1;
        checks++;
        if ((ext_en ? ext_rdata : rdata) !== refm[a]) begin
          failures++; $display("FAIL read %h: %h vs %h", a, ext_en ? ext_rdata : rdata, refm[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
