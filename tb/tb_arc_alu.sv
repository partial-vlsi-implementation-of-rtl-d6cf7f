// tb_arc_alu: self-checking test of the ripple-carry add/subtract unit.
// Random and corner operands are added and subtracted; result, carry out
// (33rd bit of a + b, or of a + ~b + 1), zero and negative flags are
// compared with values computed here in 33-bit arithmetic.
module tb_arc_alu;
  logic [31:0] a, b, y;
  logic        sub, ovflo, z, n;
  logic [32:0] exp33;
  int checks = 0, failures = 0;

  arc_alu #(.WIDTH(32)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [31:0] ia, input logic [31:0] ib, input logic isub);
    a = ia; b = ib; sub = isub;
    #1;
    exp33 = isub ? ({1'b0, ia} + {1'b0, ~ib} + 33'd1) : ({1'b0, ia} + {1'b0, ib});
    checks++;
    if (y !== exp33[31:0] || ovflo !== exp33[32] || z !== (exp33[31:0] == 0) || n !== exp33[31]) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%b y=%h c=%b z=%b n=%b exp=%h", ia, ib, isub, y, ovflo, z, n, exp33);
    end
  endtask

  initial begin
    one(32'h3322_1100, 32'h3322_0000, 1'b0);
    one(32'h3322_1100, 32'h3322_0000, 1'b1);
    one(32'hffff_ffff, 32'h0000_0001, 1'b0);
    one(32'h0000_0005, 32'h0000_0005, 1'b1);
    one(32'h0000_0000, 32'h0000_0001, 1'b1);
    for (int i = 0; i < 2000; i++) one($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
