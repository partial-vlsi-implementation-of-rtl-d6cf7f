// tb_arc_branch_sel: checks the shared BRTRUE/BRFALSE table: BRTRUE
// (ins = 0) branches when CR = 1, BRFALSE (ins = 1) when CR = 0.
module tb_arc_branch_sel;
  logic cr, ins, take;
  int checks = 0, failures = 0;

  arc_branch_sel dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // {cr, ins} -> take, from the table: CR=0: BRTRUE fin, BRFALSE T14;
    // CR=1: BRTRUE T14, BRFALSE fin.
    for (int k = 0; k < 4; k++) begin
      {cr, ins} = 2'(k);
      #1;
      checks++;
      if (take !== ((cr == 1'b1 && ins == 1'b0) || (cr == 1'b0 && ins == 1'b1))) begin
        failures++; $display("FAIL cr=%b ins=%b take=%b", cr, ins, take);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
