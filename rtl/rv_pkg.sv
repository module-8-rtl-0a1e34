// rv_pkg: constants and types shared by the three reduced RISC-V processors
// (single-cycle, multicycle, pipelined) with machine-mode exception handling.
//
// The reduced ISA executes lw, sw, addi/andi/ori/slti, add/sub/and/or/slt, beq
// and jal, plus two privileged instructions: mret and csrrw restricted to the
// mepc and mcause CSRs. Opcodes, funct3 values, CSR numbers, exception codes
// and the fixed trap vector 0x1c000000 are the ones of the RISC-V privileged
// specification. The 3-bit ALU operation codes and the result-source codes
// are those of the processors' own control tables; the encoding of the
// immediate-format select (ImmSrc) and the interrupt cause code used here
// (machine external interrupt) are this design's choices.
package rv_pkg;

  // ---------------- opcodes (instr[6:0]) ----------------
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_SYSTEM = 7'b1110011;

  // ---------------- system instructions ----------------
  localparam logic [2:0]  F3_PRIV  = 3'b000;   // ecall / mret
  localparam logic [2:0]  F3_CSRRW = 3'b001;
  localparam logic [11:0] CSR_MRET_IMM = 12'h302;  // imm field of mret
  localparam logic [11:0] CSR_MEPC   = 12'h341;
  localparam logic [11:0] CSR_MCAUSE = 12'h342;
  localparam logic [11:0] CSR_MTVEC  = 12'h305;

  // Fixed, read-only trap vector (direct mode, M = 00).
  localparam logic [31:0] MTVEC_VALUE = 32'h1c00_0000;

  // ---------------- mcause values ----------------
  localparam logic [31:0] CAUSE_MISALIGNED_FETCH = 32'h0000_0000;
  localparam logic [31:0] CAUSE_ILLEGAL_INSTR    = 32'h0000_0002;
  localparam logic [31:0] CAUSE_MISALIGNED_LOAD  = 32'h0000_0004;
  localparam logic [31:0] CAUSE_MISALIGNED_STORE = 32'h0000_0006;
  localparam logic [31:0] CAUSE_EXT_INTERRUPT    = 32'h8000_000b;

  // ---------------- ALU ----------------
  typedef enum logic [2:0] {
    ALU_ADD  = 3'b000,
    ALU_SUB  = 3'b001,
    ALU_AND  = 3'b010,
    ALU_OR   = 3'b011,
    ALU_BAD4 = 3'b100,   // not implemented: flags E
    ALU_SLT  = 3'b101,
    ALU_BAD6 = 3'b110,   // not implemented: flags E
    ALU_BAD7 = 3'b111    // not implemented: flags E
  } alu_op_e;

  // ALUOp from the main decoder / FSM
  typedef enum logic [1:0] {
    ALUOP_ADD     = 2'b00,
    ALUOP_SUB     = 2'b01,
    ALUOP_OPERATE = 2'b10
  } aluop_e;

  // Immediate formats
  typedef enum logic [1:0] {
    IMM_I = 2'b00,
    IMM_S = 2'b01,
    IMM_B = 2'b10,
    IMM_J = 2'b11
  } imm_src_e;

  // Result source of the single-cycle and pipelined processors
  typedef enum logic [2:0] {
    RES_MEM    = 3'b000,
    RES_ALU    = 3'b001,
    RES_PC4    = 3'b010,
    RES_MCAUSE = 3'b011,
    RES_MEPC   = 3'b100
  } res_src_e;

  // Control word produced by the main decoder
  typedef struct packed {
    logic     branch;
    logic     jump;
    logic     br_wr;      // register-file write enable
    logic     alu_src;    // 1: immediate as ALU operand B
    aluop_e   alu_op;
    logic     mem_wr;
    res_src_e res_src;
    logic     is_mret;
    logic     is_csrw;
    imm_src_e imm_src;
  } ctrl_t;

  // States of the multicycle processor's main FSM
  typedef enum logic [3:0] {
    S0  = 4'd0,  S1  = 4'd1,  S2  = 4'd2,  S3  = 4'd3,
    S4  = 4'd4,  S5  = 4'd5,  S6  = 4'd6,  S7  = 4'd7,
    S8  = 4'd8,  S9  = 4'd9,  S10 = 4'd10, S11 = 4'd11,
    S12 = 4'd12, S13 = 4'd13, SE  = 4'd14, SI  = 4'd15
  } mc_state_e;

endpackage
