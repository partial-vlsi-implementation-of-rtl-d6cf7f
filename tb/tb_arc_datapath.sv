// tb_arc_datapath: self-checking test of the ARC datapath.
//
// Random register transfers are run with the four-phase control of a
// T-state: a source onto S1 (a register or memory data), optionally a
// second operand onto S2 (Label, TEMP, Offset, the IR immediate or memory
// data), add or subtract, ALU output buffer load in phase 1, buffer onto D
// in phases 2-3, and a random set of destination registers loading in
// phase 3. A reference model of the twelve registers predicts every
// register after each transfer, plus the memory address (MAR), the write
// data (D), the busy bit (MDR bit 31), CR and the carry out.
module tb_arc_datapath;
  import arc_pkg::*;

  logic                        clk = 1'b0, rst_n = 1'b0;
  dp_ctrl_t                    ctrl;
  logic [31:0]                 ir = '0, mem_rdata = '0;
  logic [31:0]                 maddr, dmem_out, alubuf;
  logic                        ovflo, busy, cr;
  logic [NREGS-1:0][31:0]      regs;
  logic [31:0]                 model [NREGS];
  int checks = 0, failures = 0;

  arc_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int          s1src, s2src;
    logic        sub;
    logic [NREGS-1:0] dest;
    logic [31:0] a, b, res;
    logic [32:0] r33;
    int          nflag = 0, nsub = 0;

    ctrl = '0;
    foreach (model[i]) model[i] = '0;
    model[R_OFFSET] = 32'd1;
    model[R_TOPLDS] = 32'h4000_0000;
    #12 rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < NREGS; i++) chk(regs[i] == model[i], $sformatf("reset value of reg %0d", i));

    for (int n = 0; n < 1500; n++) begin
      // Choose the transfer.
      s1src = $urandom_range(0, 9);          // 9 = memory data
      s2src = $urandom_range(0, 5);          // 0 none, 1-3 regs, 4 imm, 5 mem
      if (s1src == 9 && s2src == 5) s2src = 0;
      sub  = 1'($urandom);
      dest = NREGS'($urandom);
      if (n < 40) dest = NREGS'(1 << (n % NREGS));   // fill every register first
      if (n < 40) s1src = 9;
      ir = $urandom;
      mem_rdata = $urandom;
      a = (s1src == 9) ? mem_rdata : model[s1src];
      case (s2src)
        1, 2, 3: b = model[9 + s2src - 1];
        4:       b = {{6{ir[31]}}, ir[31:6]};
        5:       b = mem_rdata;
        default: b = '0;
      endcase
      if (n < 40) begin b = '0; s2src = 0; sub = 1'b0; end
      r33 = sub ? ({1'b0, a} + {1'b0, ~b} + 33'd1) : ({1'b0, a} + {1'b0, b});
      res = r33[31:0];
      if (sub) nsub++;

      for (int ph = 0; ph < 4; ph++) begin
        @(negedge clk);
        ctrl = '0;
        if (s1src == 9) ctrl.s1_mem = 1'b1; else ctrl.s1_en[s1src] = 1'b1;
        case (s2src)
          1, 2, 3: ctrl.s2_en[s2src - 1] = 1'b1;
          4:       ctrl.s2_ir = 1'b1;
          5:       ctrl.s2_mem = 1'b1;
          default: ;
        endcase
        ctrl.alu_sub   = sub;
        ctrl.alubuf_ld = (ph == 1);
        ctrl.flag_upd  = (ph == 1) && (n % 7 == 3);
        ctrl.tdbus     = (ph >= 2);
        ctrl.d_ld      = (ph == 3) ? dest : '0;
        if (ph == 1) begin
          #1 chk(ovflo == r33[32], $sformatf("carry out, transfer %0d", n));
        end
        if (ph == 3) begin
          #1 chk(dmem_out == res, $sformatf("D bus %h vs %h, transfer %0d", dmem_out, res, n));
        end
      end
      @(posedge clk);
      for (int k = 0; k < NREGS; k++) if (dest[k]) model[k] = res;
      if (n % 7 == 3 && !dest[R_CFLAG]) begin
        model[R_CFLAG] = {30'b0, res[31], res == 32'h0};
        nflag++;
      end
      @(negedge clk);
      ctrl = '0;
      for (int k = 0; k < NREGS; k++)
        chk(regs[k] == model[k], $sformatf("reg %0d = %h vs %h after transfer %0d", k, regs[k], model[k], n));
      chk(maddr == model[R_MAR], "maddr is MAR");
      chk(busy == model[R_MDR][31], "busy bit is MDR bit 31");
      chk(cr == model[R_CFLAG][0], "CR is C_flag bit 0");
    end
    chk(nflag > 0 && nsub > 0, "flag capture and subtraction exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
