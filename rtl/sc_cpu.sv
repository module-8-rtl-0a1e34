// sc_cpu: single-cycle reduced RISC-V processor with exception and interrupt
// handling.
//
// Every instruction (lw, sw, addi/andi/ori/slti, add/sub/and/or/slt, beq,
// jal, mret, csrrw on mepc/mcause) completes in one clock cycle. Four units
// flag errors during the cycle: the instruction memory (fetch address not a
// multiple of 4), the illegal-instruction detector, the ALU (unimplemented
// operation) and the data memory (lw/sw address not a multiple of 4). The
// exception controller (cause_encoder) merges them. On an exception the
// instruction is cancelled (no register or memory write) and, at the clock
// edge, PC <- mtvec (0x1c000000), mepc <- PC and mcause <- cause. mret loads
// PC from mepc; csrrw rd, mcause, rs1 copies mcause to rd; csrrw rd, mepc,
// rs1 copies mepc to rd and rs1 to mepc.
//
// int_i is the external interrupt request, sampled at each rising edge. When
// it is high and the current instruction raises no exception, the
// instruction completes and the processor then traps: PC <- mtvec,
// mcause <- 0x8000000b (machine external interrupt) and mepc <- the address
// the program would have continued at (PC+4, or the branch/jump/mret
// target), so mret resumes after the finished instruction. Saving the next
// address and the interrupt code are this design's choices; an interrupt has
// no enable bit and is taken on every cycle int_i is high, so the device must
// drop it once trap_o shows it was taken.
//
// Timing: synchronous active-high reset loads PC with RESET_PC. trap_o is
// high in the cycle whose rising edge takes an exception or interrupt.
// mem_we/mem_addr/mem_wdata show the data-memory write of the cycle.
//
// The CSR unit's separate mcause output is not used: csrrw reads both CSRs
// through its read port (csr_rdata), selected by the CSR number.
module sc_cpu
  import rv_pkg::*;
#(
  parameter logic [31:0] RESET_PC  = 32'h0000_d400,
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        int_i,
  output logic [31:0] pc_o,
  output logic        trap_o,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata
);

  logic [31:0] pc, pc_plus4, pc_target, pc_normal, pc_next;
  logic [31:0] instr, imm, rd1, rd2, src_b, alu_result, read_data, result;
  logic [31:0] mepc, mcause, mtvec, csr_rdata, cause, epc_d, cause_d;
  logic        mi_err, op_err, alu_err, dm_e, md_err, exc, take_int, trap;
  logic        zero, pc_src, mem_access, epc_we;
  ctrl_t       ctrl;
  alu_op_e     alu_ctrl;

  // ---------------- fetch ----------------
  always_ff @(posedge clk)
    if (rst) pc <= RESET_PC;
    else     pc <= pc_next;

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (.a(pc), .rd(instr), .e(mi_err));

  // ---------------- decode ----------------
  main_decoder u_dec (.op(instr[6:0]), .funct3(instr[14:12]),
                      .csr(instr[31:20]), .ctrl(ctrl));
  illegal_detector u_ill (.op(instr[6:0]), .funct3(instr[14:12]),
                          .csr(instr[31:20]), .e(op_err));
  alu_decoder u_aludec (.alu_op(ctrl.alu_op), .funct3(instr[14:12]),
                        .funct7_b5(instr[30]), .op_b5(instr[5]),
                        .alu_ctrl(alu_ctrl));

  regfile #(.NEGEDGE_WRITE(1'b0)) u_rf (
    .clk, .we(ctrl.br_wr & ~exc), .ra1(instr[19:15]), .ra2(instr[24:20]),
    .wa(instr[11:7]), .wd(result), .rd1, .rd2);

  imm_extend u_ext (.instr(instr[31:7]), .imm_src(ctrl.imm_src), .imm);

  // ---------------- execute ----------------
  assign src_b = ctrl.alu_src ? imm : rd2;
  alu u_alu (.a(rd1), .b(src_b), .op(alu_ctrl), .r(alu_result), .z(zero),
             .e(alu_err));

  // ---------------- memory ----------------
  assign mem_access = ctrl.mem_wr | (ctrl.br_wr & ctrl.res_src == RES_MEM);
  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .we(ctrl.mem_wr & ~exc), .a(alu_result), .wd(rd2),
    .rd(read_data), .e(dm_e));
  assign md_err = dm_e & mem_access;

  // ---------------- exception controller ----------------
  cause_encoder u_cenc (.mi_err, .op_err, .alu_err, .md_err,
                        .mem_wr(ctrl.mem_wr), .cause, .exc);
  assign take_int = int_i & ~exc;
  assign trap     = exc | take_int;

  // ---------------- CSRs ----------------
  always_comb begin
    epc_we  = trap | (ctrl.is_csrw & instr[31:20] == CSR_MEPC);
    epc_d   = exc ? pc : (take_int ? pc_normal : rd1);
    cause_d = exc ? cause : CAUSE_EXT_INTERRUPT;
  end

  csr_unit #(.MEPC_NEGEDGE(1'b0)) u_csr (
    .clk, .rst, .epc_we, .epc_d, .cause_we(trap), .cause_d,
    .csr_addr(instr[31:20]), .mepc, .mcause, .mtvec, .csr_rdata);

  // ---------------- write back ----------------
  assign pc_plus4  = pc + 32'd4;
  assign pc_target = pc + imm;
  always_comb begin
    unique case (ctrl.res_src)
      RES_MEM:    result = read_data;
      RES_ALU:    result = alu_result;
      RES_PC4:    result = pc_plus4;
      RES_MCAUSE: result = csr_rdata;
      RES_MEPC:   result = csr_rdata;
      default:    result = alu_result;
    endcase
  end

  // ---------------- next PC ----------------
  assign pc_src = (ctrl.branch & zero) | ctrl.jump;
  always_comb begin
    if (ctrl.is_mret)  pc_normal = mepc;
    else if (pc_src)   pc_normal = pc_target;
    else               pc_normal = pc_plus4;
    pc_next = trap ? mtvec : pc_normal;
  end

  assign pc_o      = pc;
  assign trap_o    = trap;
  assign mem_we    = ctrl.mem_wr & ~exc;
  assign mem_addr  = alu_result;
  assign mem_wdata = rd2;

endmodule
