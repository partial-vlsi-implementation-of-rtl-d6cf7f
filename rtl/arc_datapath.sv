// arc_datapath: the ARC register set, buses and ALU.
//
// Twelve 32-bit registers (TopLDS, TopPAS, MDR, MAR, C_reg, PC, FDR, FR,
// C_flag on source bus S1; Label, TEMP, Offset on source bus S2), the
// ripple-carry ALU, the ALU output buffer and the destination bus D. Data
// has one path: a register drives S1 and/or S2, the ALU adds or subtracts
// S2 from S1, the ALU output buffer captures the result, the buffer drives
// D, and any register whose load line is high takes D. An undriven source
// bus reads zero, so a transfer "A <- B" is B + 0 through the ALU.
//
// Memory interface: MAR is the memory address bus (maddr) and D is the
// memory write data (dmem_out). Memory read data can be gated onto S1 (as
// in the bus interface of the original, used by MDR <- M[MAR]) or onto S2
// (used by MDR <- MDR +/- M[MAR], whose other operand is already on S1;
// this second path is this design's choice). The IR operand field,
// IR[31:6] sign-extended, can be gated onto S2 as the immediate offset.
//
// C_flag loads from D like the other registers, and also takes {N, Z} of
// the ALU result when flag_upd is high (bit 0 = Z, bit 1 = N; this capture
// path is this design's choice, the original only says the register
// indicates zero or negative). busy is the MSB of MDR (the busy bit) and
// cr is bit 0 of C_flag.
//
// Timing: all loads are synchronous to clk; control lines come from
// arc_tstate_decode, which asserts the ALU buffer load in phase 1 and the
// register loads in phase 3 of a T-state. Reset clears every register
// except two, a choice of this design: Offset resets to 1 (the word step
// of the PC) and TopLDS to TOPLDS_RESET, the first word of the local data
// stack in the memory map of arc_memory, since no implemented instruction
// can load TopLDS with an absolute address.
module arc_datapath
  import arc_pkg::*;
#(
  parameter int unsigned      WIDTH        = 32,
  parameter logic [WIDTH-1:0] TOPLDS_RESET = WIDTH'(32'h4000_0000)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  dp_ctrl_t                     ctrl,
  input  logic [WIDTH-1:0]             ir,
  input  logic [WIDTH-1:0]             mem_rdata,
  output logic [WIDTH-1:0]             maddr,
  output logic [WIDTH-1:0]             dmem_out,
  output logic                         ovflo,
  output logic                         busy,
  output logic                         cr,
  output logic [NREGS-1:0][WIDTH-1:0]  regs,
  output logic [WIDTH-1:0]             alubuf
);

  logic [NREGS-1:0][WIDTH-1:0] reg_d;
  logic [NREGS-1:0][WIDTH-1:0] reg_bus;
  logic [NREGS-1:0]            reg_en;
  logic [NREGS-1:0]            reg_ld;
  logic [WIDTH-1:0]            s1_bus, s2_bus, d_bus;
  logic [WIDTH-1:0]            alu_y, alubuf_bus;
  logic                        alu_z, alu_n;
  logic [WIDTH-1:0]            imm;

  assign reg_en = {ctrl.s2_en, ctrl.s1_en};

  always_comb begin
    reg_d  = '{default: d_bus};
    reg_ld = ctrl.d_ld;
    if (ctrl.flag_upd) begin
      reg_d[R_CFLAG]  = {{(WIDTH-2){1'b0}}, alu_n, alu_z};
      reg_ld[R_CFLAG] = 1'b1;
    end
  end

  for (genvar i = 0; i < NREGS; i++) begin : g_reg
    arc_reg32 #(
      .WIDTH      (WIDTH),
      .RESET_VALUE((i == R_OFFSET) ? WIDTH'(1) :
                   (i == R_TOPLDS) ? TOPLDS_RESET : '0)
    ) u_reg (
      .clk    (clk),
      .rst_n  (rst_n),
      .ld     (reg_ld[i]),
      .d      (reg_d[i]),
      .en     (reg_en[i]),
      .q      (regs[i]),
      .bus_out(reg_bus[i])
    );
  end

  assign imm = WIDTH'(signed'(ir[WIDTH-1:6]));

  arc_bus #(.N(10), .WIDTH(WIDTH)) u_s1 (
    .clk (clk),
    .en  ({ctrl.s1_mem, ctrl.s1_en}),
    .din ({mem_rdata, reg_bus[8:0]}),
    .dout(s1_bus)
  );

  arc_bus #(.N(5), .WIDTH(WIDTH)) u_s2 (
    .clk (clk),
    .en  ({ctrl.s2_mem, ctrl.s2_ir, ctrl.s2_en}),
    .din ({mem_rdata, imm, reg_bus[11:9]}),
    .dout(s2_bus)
  );

  arc_alu #(.WIDTH(WIDTH)) u_alu (
    .a    (s1_bus),
    .b    (s2_bus),
    .sub  (ctrl.alu_sub),
    .y    (alu_y),
    .ovflo(ovflo),
    .z    (alu_z),
    .n    (alu_n)
  );

  arc_reg32 #(.WIDTH(WIDTH)) u_alubuf (
    .clk    (clk),
    .rst_n  (rst_n),
    .ld     (ctrl.alubuf_ld),
    .d      (alu_y),
    .en     (ctrl.tdbus),
    .q      (alubuf),
    .bus_out(alubuf_bus)
  );

  // The ALU output buffer is the only driver of D.
  assign d_bus    = alubuf_bus;
  assign maddr    = regs[R_MAR];
  assign dmem_out = d_bus;
  assign busy     = regs[R_MDR][WIDTH-1];
  assign cr       = regs[R_CFLAG][0];

endmodule
