// arc_top: the ARC processor slice - control unit, datapath and memory.
//
// The control unit has two levels. Cu1 (arc_main_ctrl) fetches: T1 puts
// the PC into MAR, T2 reads the instruction into the IR and adds Offset
// (1) to the PC. If the instruction needs more states Cu1 enters T3 and
// Cu2 (arc_control2) runs that instruction's control unit until it raises
// FIN; otherwise Cu1 goes back to T1, or to T0 to wait for the start
// signal. The T-state lines, with the four-phase timing of arc_phase_gen,
// become the datapath control lines in arc_tstate_decode. The datapath
// moves data register -> source bus -> ALU -> ALU output buffer ->
// destination bus -> register, and reaches memory through MAR (address)
// and the destination bus (write data).
//
// Instructions executed: NOP, WAIT, END, ADD, SUB, DTS, BRANCH, BRTRUE and
// BRFALSE (opcodes in arc_pkg). Every T-state is four clk cycles, so an
// instruction of k T-states takes 4k cycles (NOP 8, ADD/SUB 32, DTS 24,
// BRANCH 12). PUSH, PUSHL and PUSHI run their full T-state sequences (8, 8
// and 12 T-states, plus one T-state for each repeat of a busy read), but
// only their states T10, T25, T26 and T27 move data. Their other states
// come out on ts_open for logic outside this slice.
//
// The busy bit that repeats a PUSHL/PUSHI memory read is bit 31 of the
// word on the destination bus, which in T27 is the word being loaded into
// MDR.
//
// Interface: start is the S input of Cu1, sampled at the end of each
// T-state while in T0. The ext_* port gives a host access to the memory
// bus (see arc_memory); use it while t_state[0] (T0) is high. regs shows
// the twelve datapath registers in arc_pkg order. rst_n is an active-low
// asynchronous reset of all control state and registers.
module arc_top
  import arc_pkg::*;
#(
  parameter int unsigned INSM_WORDS = 4096,
  parameter int unsigned LDS_WORDS  = 4096,
  parameter int unsigned IM_WORDS   = 65536,
  parameter int unsigned FM_WORDS   = 65536
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      ext_en,
  input  logic                      ext_we,
  input  logic [31:0]               ext_addr,
  input  logic [31:0]               ext_wdata,
  output logic [31:0]               ext_rdata,
  output logic [3:0]                t_state,
  output logic [1:0]                phase,
  output logic [31:0]               ir,
  output logic [NREGS-1:0][31:0]    regs,
  output logic                      ovflo,
  output logic                      busy,
  output logic                      cr,
  output tstates_open_t             ts_open
);

  logic        tick;
  logic        x, y, fin;
  tstates_t    ts;
  dp_ctrl_t    ctrl;
  logic [31:0] maddr, dmem_out, mem_rdata, alubuf;

  arc_phase_gen u_phase (
    .clk  (clk),
    .rst_n(rst_n),
    .phase(phase),
    .tick (tick)
  );

  arc_main_ctrl u_cu1 (
    .clk  (clk),
    .rst_n(rst_n),
    .ce   (tick),
    .s    (start),
    .x    (x),
    .y    (y),
    .fin  (fin),
    .t    (t_state)
  );

  arc_control2 u_cu2 (
    .clk    (clk),
    .rst_n  (rst_n),
    .adv    (tick),
    .t_main (t_state),
    .ir     (ir),
    .cr     (cr),
    .bb     (dmem_out[31]),
    .x      (x),
    .y      (y),
    .fin    (fin),
    .tstates(ts),
    .ts_open(ts_open)
  );

  arc_tstate_decode u_dec (
    .ts   (ts),
    .phase(phase),
    .ctrl (ctrl)
  );

  // Instruction register, loaded from the memory data bus in T2.
  arc_reg32 #(.WIDTH(32)) u_ir (
    .clk    (clk),
    .rst_n  (rst_n),
    .ld     (ctrl.ir_ld),
    .d      (mem_rdata),
    .en     (1'b0),
    .q      (ir),
    .bus_out()
  );

  arc_datapath #(.WIDTH(32)) u_dp (
    .clk      (clk),
    .rst_n    (rst_n),
    .ctrl     (ctrl),
    .ir       (ir),
    .mem_rdata(mem_rdata),
    .maddr    (maddr),
    .dmem_out (dmem_out),
    .ovflo    (ovflo),
    .busy     (busy),
    .cr       (cr),
    .regs     (regs),
    .alubuf   (alubuf)
  );

  arc_memory #(
    .INSM_WORDS(INSM_WORDS),
    .LDS_WORDS (LDS_WORDS),
    .IM_WORDS  (IM_WORDS),
    .FM_WORDS  (FM_WORDS),
    .WIDTH     (32)
  ) u_mem (
    .clk      (clk),
    .addr     (maddr),
    .wdata    (dmem_out),
    .we       (ctrl.mem_we & ~ctrl.mem_rd),
    .rdata    (mem_rdata),
    .ext_en   (ext_en),
    .ext_we   (ext_we),
    .ext_addr (ext_addr),
    .ext_wdata(ext_wdata),
    .ext_rdata(ext_rdata)
  );

endmodule
