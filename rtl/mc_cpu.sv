// mc_cpu: multicycle reduced RISC-V processor with exception and interrupt
// handling.
//
// A single memory (data_mem) holds instructions and data. Each instruction
// takes 3 to 5 states of the main FSM (mc_main_fsm): S0 fetches into IR and
// keeps the instruction's address in OldPC while PC advances to PC+4. The
// datapath registers A, B, ALUOut and MDR (memory data) are loaded every
// cycle; PC, OldPC/IR, mepc and mcause only when the FSM enables them.
//
// Errors are checked in the state where they can happen: a misaligned fetch
// in S0, an illegal instruction in S1, an unimplemented ALU operation in S6
// or S8, a misaligned data access in S3 or S5. The FSM then goes to SE, which
// writes mepc <- OldPC, mcause <- cause and PC <- mtvec (0x1c000000); the
// cancelled instruction has written nothing (a misaligned store is blocked by
// the memory itself). The cause encoder's output is registered every cycle
// (cause_q), so SE stores the cause found in the state before it: this
// register is this design's way of carrying the cause into SE.
//
// mepc's input is the ALU's A-operand multiplexer: OldPC in SE, PC in SI
// (the next instruction, for an interrupt taken after an instruction
// completed) and register A in S13 (csrrw rd, mepc, rs1). SI writes mcause
// with 0x8000000b (machine external interrupt, this design's choice of code).
//
// Ports: int_i is the level-sensitive interrupt request, checked in the last
// state of lw, sw, ALU instructions and beq; trap_o is high in SE and SI;
// mem_we/mem_addr/mem_wdata show the memory write of the cycle. Synchronous
// active-high reset; PC starts at RESET_PC.
//
// The CSR unit's combined read port (csr_rdata) is left unused here: the
// result multiplexer takes mepc and mcause directly (ResSrc 100 and 101),
// as the multicycle data path does.
module mc_cpu
  import rv_pkg::*;
#(
  parameter logic [31:0] RESET_PC  = 32'h0000_d400,
  parameter int unsigned MEM_WORDS = 1024
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

  mc_state_e   state;
  logic        branch, pc_update, addr_src, mem_wr, ir_wr, br_wr;
  logic        cause_wr, epc_wr, pc_write, zero;
  logic [1:0]  alu_src_a, alu_src_b;
  logic [2:0]  res_src;
  aluop_e      alu_op;
  alu_op_e     alu_ctrl;
  imm_src_e    imm_src;

  logic [31:0] pc, old_pc, ir, mdr, a_q, b_q, alu_out;
  logic [31:0] adr, mem_rd, rd1, rd2, imm, src_a, src_b, alu_result, result;
  logic [31:0] mepc, mcause, mtvec, csr_rdata, cause, cause_q, cause_d;
  logic        m_err, op_err, alu_err, exc_unused;
  logic        mi_err_s, op_err_s, alu_err_s, md_err_s;

  // ---------------- controller ----------------
  mc_main_fsm u_fsm (
    .clk, .rst, .op(ir[6:0]), .funct3(ir[14:12]), .csr(ir[31:20]),
    .m_err, .op_err, .alu_err, .int_i, .state,
    .branch, .pc_update, .addr_src, .mem_wr, .ir_wr, .br_wr,
    .alu_src_a, .alu_src_b, .alu_op, .res_src, .cause_wr, .epc_wr);

  illegal_detector u_ill (.op(ir[6:0]), .funct3(ir[14:12]), .csr(ir[31:20]),
                          .e(op_err));
  alu_decoder u_aludec (.alu_op, .funct3(ir[14:12]), .funct7_b5(ir[30]),
                        .op_b5(ir[5]), .alu_ctrl);

  always_comb begin
    unique case (ir[6:0])
      OP_STORE:  imm_src = IMM_S;
      OP_BRANCH: imm_src = IMM_B;
      OP_JAL:    imm_src = IMM_J;
      default:   imm_src = IMM_I;
    endcase
  end

  assign pc_write = pc_update | (branch & zero);

  // ---------------- state registers ----------------
  always_ff @(posedge clk) begin
    if (rst)           pc <= RESET_PC;
    else if (pc_write) pc <= result;
  end

  always_ff @(posedge clk) begin
    if (ir_wr) begin
      old_pc <= pc;
      ir     <= mem_rd;
    end
    mdr     <= mem_rd;
    a_q     <= rd1;
    b_q     <= rd2;
    alu_out <= alu_result;
    cause_q <= cause;
  end

  // ---------------- memory ----------------
  assign adr = addr_src ? result : pc;
  data_mem #(.WORDS(MEM_WORDS)) u_mem (
    .clk, .we(mem_wr), .a(adr), .wd(b_q), .rd(mem_rd), .e(m_err));

  // ---------------- register file, immediate ----------------
  regfile #(.NEGEDGE_WRITE(1'b0)) u_rf (
    .clk, .we(br_wr), .ra1(ir[19:15]), .ra2(ir[24:20]), .wa(ir[11:7]),
    .wd(result), .rd1, .rd2);
  imm_extend u_ext (.instr(ir[31:7]), .imm_src, .imm);

  // ---------------- ALU ----------------
  always_comb begin
    unique case (alu_src_a)
      2'b00:   src_a = pc;
      2'b01:   src_a = old_pc;
      default: src_a = a_q;
    endcase
    unique case (alu_src_b)
      2'b00:   src_b = b_q;
      2'b01:   src_b = imm;
      default: src_b = 32'd4;
    endcase
  end
  alu u_alu (.a(src_a), .b(src_b), .op(alu_ctrl), .r(alu_result), .z(zero),
             .e(alu_err));

  // ---------------- exception cause ----------------
  assign mi_err_s  = m_err & (state == S0);
  assign op_err_s  = op_err & (state == S1);
  assign alu_err_s = alu_err & (state == S6 || state == S8);
  assign md_err_s  = m_err & (state == S3 || state == S5);
  cause_encoder u_cenc (.mi_err(mi_err_s), .op_err(op_err_s),
                        .alu_err(alu_err_s), .md_err(md_err_s),
                        .mem_wr, .cause, .exc(exc_unused));
  assign cause_d = (state == SI) ? CAUSE_EXT_INTERRUPT : cause_q;

  csr_unit #(.MEPC_NEGEDGE(1'b0)) u_csr (
    .clk, .rst, .epc_we(epc_wr), .epc_d(src_a), .cause_we(cause_wr), .cause_d,
    .csr_addr(ir[31:20]), .mepc, .mcause, .mtvec, .csr_rdata);

  // ---------------- result multiplexer ----------------
  always_comb begin
    unique case (res_src)
      3'b000:  result = alu_out;
      3'b001:  result = mdr;
      3'b010:  result = alu_result;
      3'b011:  result = mtvec;
      3'b100:  result = mepc;
      3'b101:  result = mcause;
      default: result = alu_out;
    endcase
  end

  assign pc_o      = pc;
  assign trap_o    = (state == SE) || (state == SI);
  assign mem_we    = mem_wr & ~m_err;
  assign mem_addr  = adr;
  assign mem_wdata = b_q;

endmodule
