// arc_pkg: types and constants shared by the ARC processor slice.
//
// The ARC is a 32-bit, word-addressed stack processor. Its datapath has
// one unique path: register -> source bus (S1 or S2) -> ALU -> ALU output
// buffer -> destination bus (D) -> register. Every instruction runs as a
// sequence of T-states; each T-state lasts four clock cycles (phases 0..3),
// which stand in for the four-phase clock that the T-state lines are ANDed
// with.
//
// Register order on the S1 enables and D-bus loads follows the order in
// which the original datapath numbers its control lines. The opcode values
// are this design's own: the instruction register holds the opcode in bits
// 5..0 and the operand in bits 31..6; bit 5 is the "continue" bit that the
// main control unit reads (IR#5).
package arc_pkg;

  localparam int unsigned W = 32;

  // Registers that drive S1 (index into s1_en) and that load from D.
  localparam int unsigned R_TOPLDS = 0;
  localparam int unsigned R_TOPPAS = 1;
  localparam int unsigned R_MDR    = 2;
  localparam int unsigned R_MAR    = 3;
  localparam int unsigned R_CREG   = 4;
  localparam int unsigned R_PC     = 5;
  localparam int unsigned R_FDR    = 6;
  localparam int unsigned R_FR     = 7;
  localparam int unsigned R_CFLAG  = 8;
  // Registers that drive S2 (index into s2_en); on D they are 9 + index.
  localparam int unsigned R2_LABEL  = 0;
  localparam int unsigned R2_TEMP   = 1;
  localparam int unsigned R2_OFFSET = 2;
  localparam int unsigned R_LABEL  = 9;
  localparam int unsigned R_TEMP   = 10;
  localparam int unsigned R_OFFSET = 11;
  localparam int unsigned NREGS    = 12;

  // Opcode, IR[5:0]. Bit 5 set: fetch continues after a T2-only
  // instruction; clear: the processor returns to T0 and waits for S.
  typedef enum logic [5:0] {
    OP_END     = 6'h00,
    OP_WAIT    = 6'h01,
    OP_NOP     = 6'h20,
    OP_ADD     = 6'h22,
    OP_SUB     = 6'h23,
    OP_DTS     = 6'h24,
    OP_BRANCH  = 6'h25,
    OP_BRTRUE  = 6'h26,
    OP_BRFALSE = 6'h27,
    OP_PUSH    = 6'h28,
    OP_PUSHL   = 6'h29,
    OP_PUSHI   = 6'h2A
  } opcode_e;

  // Named T-states of the instructions that are implemented.
  //   t1   MAR <- PC                      (fetch)
  //   t2   IR <- M[MAR]; PC <- PC + Offset (fetch)
  //   t10  MAR, TopLDS <- TopLDS + imm
  //   t14  PC <- PC + imm                 (branch)
  //   t16  MAR <- MAR + imm
  //   t17  MDR <- MDR + M[MAR]
  //   t18  MDR <- MDR - M[MAR]
  //   t25  M[MAR] <- MDR                  (memory write)
  //   t26  MAR <- TopLDS
  //   t27  MDR <- M[MAR]                  (memory read)
  typedef struct packed {
    logic t1;
    logic t2;
    logic t10;
    logic t14;
    logic t16;
    logic t17;
    logic t18;
    logic t25;
    logic t26;
    logic t27;
  } tstates_t;

  // T-states that the PUSH, PUSHL and PUSHI control units step through
  // but whose register transfers are not defined in this design. They
  // drive no datapath line and are brought out of the top level.
  typedef struct packed {
    logic t11;
    logic t12;
    logic t13;
    logic t15;
    logic t19;
    logic t23;
    logic t29;
    logic t30;
  } tstates_open_t;

  // Datapath and memory control lines for one clock cycle.
  typedef struct packed {
    logic [8:0]       s1_en;     // register -> S1
    logic             s1_mem;    // memory data -> S1
    logic [2:0]       s2_en;     // Label, TEMP, Offset -> S2
    logic             s2_ir;     // IR operand (sign-extended) -> S2
    logic             s2_mem;    // memory data -> S2
    logic             alu_sub;   // 1: S1 - S2, 0: S1 + S2
    logic             alubuf_ld; // ALU output buffer load
    logic             tdbus;     // ALU output buffer -> D
    logic [NREGS-1:0] d_ld;      // D -> register load
    logic             flag_upd;  // C_flag <- {N, Z} of the ALU
    logic             mem_rd;    // memory bus direction: 1 read, 0 write
    logic             mem_we;    // memory write strobe
    logic             ir_ld;     // IR <- memory data
  } dp_ctrl_t;

endpackage
