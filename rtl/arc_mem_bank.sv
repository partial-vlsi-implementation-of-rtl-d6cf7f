// arc_mem_bank: one word-addressed memory array of the ARC.
//
// WORDS words of WIDTH bits. A write happens on the rising clk edge when
// we is high; the read port is asynchronous, so rdata follows addr within
// the same cycle (the datapath passes read data through the ALU before
// the end of the T-state phase that captures it). Only the low
// $clog2(WORDS) address bits are used. The original builds memory from
// its register cells with an address decoder; here it is an array, and
// its contents are not reset.
module arc_mem_bank #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
