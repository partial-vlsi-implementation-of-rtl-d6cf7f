// arc_memory: the ARC memory system.
//
// Four memories share one address bus, one data bus and one read/write
// line: instruction memory (InsM), the local data stack (LDS), indexed
// memory (IM) and facility memory (FM). The top two address bits select
// the memory (00 InsM, 01 LDS, 10 IM, 11 FM) and the remaining bits index
// it; the bank sizes default to the original's 4K words for InsM and LDS
// and 64K words for IM and FM. Which two bits select, and the order of the
// four memories, are this design's choices.
//
// An external port (ext_en) shares the same buses, as the processor's
// external interface does: while ext_en is high it owns the address and
// data buses, which lets a host load a program and read results while the
// processor is idle. ext_rdata and rdata both carry the read data.
//
// Timing: writes on the rising clk edge with we (or ext_we) high; reads
// are asynchronous.
module arc_memory #(
  parameter int unsigned INSM_WORDS = 4096,
  parameter int unsigned LDS_WORDS  = 4096,
  parameter int unsigned IM_WORDS   = 65536,
  parameter int unsigned FM_WORDS   = 65536,
  parameter int unsigned WIDTH      = 32
) (
  input  logic             clk,
  input  logic [31:0]      addr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             we,
  output logic [WIDTH-1:0] rdata,
  input  logic             ext_en,
  input  logic             ext_we,
  input  logic [31:0]      ext_addr,
  input  logic [WIDTH-1:0] ext_wdata,
  output logic [WIDTH-1:0] ext_rdata
);

  logic [31:0]      a;
  logic [WIDTH-1:0] wd;
  logic             w;
  logic [1:0]       sel;
  logic [3:0]       bank_we;
  logic [WIDTH-1:0] rd [4];

  assign a   = ext_en ? ext_addr  : addr;
  assign wd  = ext_en ? ext_wdata : wdata;
  assign w   = ext_en ? ext_we    : we;
  assign sel = a[31:30];

  always_comb begin
    bank_we      = '0;
    bank_we[sel] = w;
  end

  arc_mem_bank #(.WORDS(INSM_WORDS), .WIDTH(WIDTH)) u_insm (
    .clk(clk), .we(bank_we[0]), .addr(a[$clog2(INSM_WORDS)-1:0]), .wdata(wd), .rdata(rd[0]));
  arc_mem_bank #(.WORDS(LDS_WORDS), .WIDTH(WIDTH)) u_lds (
    .clk(clk), .we(bank_we[1]), .addr(a[$clog2(LDS_WORDS)-1:0]), .wdata(wd), .rdata(rd[1]));
  arc_mem_bank #(.WORDS(IM_WORDS), .WIDTH(WIDTH)) u_im (
    .clk(clk), .we(bank_we[2]), .addr(a[$clog2(IM_WORDS)-1:0]), .wdata(wd), .rdata(rd[2]));
  arc_mem_bank #(.WORDS(FM_WORDS), .WIDTH(WIDTH)) u_fm (
    .clk(clk), .we(bank_we[3]), .addr(a[$clog2(FM_WORDS)-1:0]), .wdata(wd), .rdata(rd[3]));

  assign rdata     = rd[sel];
  assign ext_rdata = rd[sel];

endmodule
