// tb_arc_main_ctrl: self-checking test of Cu1, the T0..T3 state machine.
// Random S, X, Y and FIN are applied with random clock enables; a
// reference state machine written from the state table (T0 waits for S;
// T1 -> T2; T2 -> T3 if X, else T1 if Y, else T0; T3 holds until FIN,
// then T1) predicts the one-hot output. Every transition of the table is
// counted and must occur.
module tb_arc_main_ctrl;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       ce, s, x, y, fin;
  logic [3:0] t;
  int         st;
  int checks = 0, failures = 0;
  int seen [8];

  arc_main_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    st = 0;
    ce = 0; s = 0; x = 0; y = 0; fin = 0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (t !== 4'(1 << st)) begin failures++; $display("FAIL t=%b expected T%0d", t, st); end
      ce = ($urandom_range(0, 3) != 0);
      s = 1'($urandom); x = 1'($urandom); y = 1'($urandom); fin = 1'($urandom);
      @(posedge clk);
      if (ce) begin
        case (st)
          0: begin seen[s] ++; st = s ? 1 : 0; end
          1: begin seen[2]++; st = 2; end
          2: begin
               if (x) begin seen[3]++; st = 3; end
               else if (y) begin seen[4]++; st = 1; end
               else begin seen[5]++; st = 0; end
             end
          default: begin seen[fin ? 7 : 6]++; st = fin ? 1 : 3; end
        endcase
      end
    end
    foreach (seen[k]) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL transition %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
