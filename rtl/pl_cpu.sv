// pl_cpu: five-stage pipelined reduced RISC-V processor (IF, ID, EX, MEM,
// WB) with precise exceptions, mret, csrrw on mepc/mcause, forwarding and a
// hazard unit.
//
// Exceptions are detected where they arise (misaligned fetch in IF, illegal
// instruction in ID, unimplemented ALU operation in EX, misaligned lw/sw in
// MEM), travel down the pipeline with the instruction, and are all acted on
// when the instruction reaches MEM. There the cause encoder picks the cause;
// the instruction and all younger ones are flushed (no register, memory or
// CSR write), mepc <- its PC, mcause <- cause and the next fetch is from
// mtvec = 0x1c000000. Older instructions, already in WB, complete. So an
// earlier instruction's exception always wins, even if a later one's was
// detected first, and mepc/mcause are stored precisely.
//
// mret takes its branch in EX (PC <- mepc) and, like a taken beq or jal,
// flushes the two younger instructions. csrrw reads the CSR in EX, writes
// mepc in MEM and writes rd in WB; an instruction that uses its rd right
// after it is stalled one cycle, as after a load. mepc is written on the
// falling clock edge, so an mret in EX reads the value written by a csrrw in
// MEM in the same cycle. The register file is also written on the falling
// edge (first half of the cycle). Forwarding from MEM passes PC+4 for a jal
// and the ALU result otherwise (the PC+4 case is this design's addition).
//
// Not included: interrupts (this pipeline has no interrupt input).
// Ports: trap_o is high in the cycle an exception is taken (instruction in
// MEM); mem_we/mem_addr/mem_wdata show the data-memory write of the cycle.
// Synchronous active-high reset empties the pipeline and loads PC with
// RESET_PC.
//
// The CSR unit's separate mcause output is not used: csrrw reads both CSRs
// through its read port (csr_rdata), selected by the CSR number.
module pl_cpu
  import rv_pkg::*;
#(
  parameter logic [31:0] RESET_PC  = 32'h0000_d400,
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] pc_o,
  output logic        trap_o,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata
);

  // ---------------- pipeline register types ----------------
  typedef struct packed {
    logic        valid;    // 0 for a bubble (reset or flush)
    logic [31:0] instr;
    logic [31:0] pc;
    logic        mi_err;
  } if_id_t;

  typedef struct packed {
    logic        branch, jump, br_wr, alu_src, mem_wr, is_mret, is_csrw;
    res_src_e    res_src;
    alu_op_e     alu_ctrl;
    logic [31:0] rd1, rd2, imm, pc;
    logic [4:0]  rs1, rs2, rd;
    logic [11:0] csr;
    logic        mi_err, op_err;
  } id_ex_t;

  typedef struct packed {
    logic        br_wr, mem_wr, is_csrw;
    res_src_e    res_src;
    logic [31:0] alu_result, write_data, pc, csr_val, csr_wd;
    logic [4:0]  rd;
    logic [11:0] csr;
    logic        mi_err, op_err, alu_err;
  } ex_mem_t;

  typedef struct packed {
    logic        br_wr;
    res_src_e    res_src;
    logic [31:0] alu_result, read_data, pc, csr_val;
    logic [4:0]  rd;
  } mem_wb_t;

  if_id_t  d, d_n;
  id_ex_t  e, e_n;
  ex_mem_t m, m_n;
  mem_wb_t w, w_n;

  logic stall_f, stall_d, flush_d, flush_e, flush_m, flush_w;

  // ================= IF =================
  logic [31:0] pc_f, pc_next, instr_f;
  logic        mi_err_f;
  logic [31:0] mepc, mcause, mtvec, csr_rdata_e;
  logic [31:0] pc_target_e;
  logic        pc_src_e, exc_m;

  always_ff @(posedge clk)
    if (rst)           pc_f <= RESET_PC;
    else if (!stall_f) pc_f <= pc_next;

  always_comb begin
    if (exc_m)          pc_next = mtvec;
    else if (e.is_mret) pc_next = mepc;
    else if (pc_src_e)  pc_next = pc_target_e;
    else                pc_next = pc_f + 32'd4;
  end

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (.a(pc_f), .rd(instr_f), .e(mi_err_f));

  assign d_n = '{valid: 1'b1, instr: instr_f, pc: pc_f, mi_err: mi_err_f};

  always_ff @(posedge clk)
    if (rst || flush_d) d <= '0;
    else if (!stall_d)  d <= d_n;

  // ================= ID =================
  ctrl_t       ctrl_d;
  alu_op_e     alu_ctrl_d;
  logic [31:0] rd1_d, rd2_d, imm_d, result_w;
  logic        op_err_d, op_err_raw_d;

  main_decoder u_dec (.op(d.instr[6:0]), .funct3(d.instr[14:12]),
                      .csr(d.instr[31:20]), .ctrl(ctrl_d));
  illegal_detector u_ill (.op(d.instr[6:0]), .funct3(d.instr[14:12]),
                          .csr(d.instr[31:20]), .e(op_err_raw_d));
  assign op_err_d = op_err_raw_d & d.valid;   // a bubble is not an illegal instruction
  alu_decoder u_aludec (.alu_op(ctrl_d.alu_op), .funct3(d.instr[14:12]),
                        .funct7_b5(d.instr[30]), .op_b5(d.instr[5]),
                        .alu_ctrl(alu_ctrl_d));
  regfile #(.NEGEDGE_WRITE(1'b1)) u_rf (
    .clk, .we(w.br_wr), .ra1(d.instr[19:15]), .ra2(d.instr[24:20]),
    .wa(w.rd), .wd(result_w), .rd1(rd1_d), .rd2(rd2_d));
  imm_extend u_ext (.instr(d.instr[31:7]), .imm_src(ctrl_d.imm_src), .imm(imm_d));

  always_comb begin
    e_n          = '0;
    e_n.branch   = ctrl_d.branch;
    e_n.jump     = ctrl_d.jump;
    e_n.br_wr    = ctrl_d.br_wr;
    e_n.alu_src  = ctrl_d.alu_src;
    e_n.mem_wr   = ctrl_d.mem_wr;
    e_n.is_mret  = ctrl_d.is_mret;
    e_n.is_csrw  = ctrl_d.is_csrw;
    e_n.res_src  = ctrl_d.res_src;
    e_n.alu_ctrl = alu_ctrl_d;
    e_n.rd1      = rd1_d;
    e_n.rd2      = rd2_d;
    e_n.imm      = imm_d;
    e_n.pc       = d.pc;
    e_n.rs1      = d.instr[19:15];
    e_n.rs2      = d.instr[24:20];
    e_n.rd       = d.instr[11:7];
    e_n.csr      = d.instr[31:20];
    e_n.mi_err   = d.mi_err;
    e_n.op_err   = op_err_d;
  end

  always_ff @(posedge clk)
    if (rst || flush_e) e <= '0;
    else                e <= e_n;

  // ================= EX =================
  logic [1:0]  fwd_a, fwd_b;
  logic [31:0] src_a_e, wdata_e, src_b_e, alu_result_e, fwd_m;
  logic        zero_e, alu_err_e;

  pl_forward_unit u_fwd (.rs1_e(e.rs1), .rs2_e(e.rs2), .rd_m(m.rd), .rd_w(w.rd),
                         .br_wr_m(m.br_wr), .br_wr_w(w.br_wr), .fwd_a, .fwd_b);

  assign fwd_m = (m.res_src == RES_PC4) ? m.pc + 32'd4 : m.alu_result;

  always_comb begin
    unique case (fwd_a)
      2'b10:   src_a_e = fwd_m;
      2'b01:   src_a_e = result_w;
      default: src_a_e = e.rd1;
    endcase
    unique case (fwd_b)
      2'b10:   wdata_e = fwd_m;
      2'b01:   wdata_e = result_w;
      default: wdata_e = e.rd2;
    endcase
  end

  assign src_b_e = e.alu_src ? e.imm : wdata_e;
  alu u_alu (.a(src_a_e), .b(src_b_e), .op(e.alu_ctrl), .r(alu_result_e),
             .z(zero_e), .e(alu_err_e));

  assign pc_target_e = e.pc + e.imm;
  assign pc_src_e    = (e.branch & zero_e) | e.jump;

  always_comb begin
    m_n            = '0;
    m_n.br_wr      = e.br_wr;
    m_n.mem_wr     = e.mem_wr;
    m_n.is_csrw    = e.is_csrw;
    m_n.res_src    = e.res_src;
    m_n.alu_result = alu_result_e;
    m_n.write_data = wdata_e;
    m_n.pc         = e.pc;
    m_n.csr_val    = csr_rdata_e;
    m_n.csr_wd     = src_a_e;
    m_n.rd         = e.rd;
    m_n.csr        = e.csr;
    m_n.mi_err     = e.mi_err;
    m_n.op_err     = e.op_err;
    m_n.alu_err    = alu_err_e;
  end

  always_ff @(posedge clk)
    if (rst || flush_m) m <= '0;
    else                m <= m_n;

  // ================= MEM =================
  logic [31:0] read_data_m, cause_m;
  logic        dm_e, md_err_m, mem_access_m;

  assign mem_access_m = m.mem_wr | (m.br_wr & m.res_src == RES_MEM);
  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .we(m.mem_wr & ~exc_m), .a(m.alu_result), .wd(m.write_data),
    .rd(read_data_m), .e(dm_e));
  assign md_err_m = dm_e & mem_access_m;

  cause_encoder u_cenc (.mi_err(m.mi_err), .op_err(m.op_err),
                        .alu_err(m.alu_err), .md_err(md_err_m),
                        .mem_wr(m.mem_wr), .cause(cause_m), .exc(exc_m));

  csr_unit #(.MEPC_NEGEDGE(1'b1)) u_csr (
    .clk, .rst,
    .epc_we(exc_m | (m.is_csrw & m.csr == CSR_MEPC)),
    .epc_d(exc_m ? m.pc : m.csr_wd),
    .cause_we(exc_m), .cause_d(cause_m),
    .csr_addr(e.csr), .mepc, .mcause, .mtvec, .csr_rdata(csr_rdata_e));

  always_comb begin
    w_n            = '0;
    w_n.br_wr      = m.br_wr;
    w_n.res_src    = m.res_src;
    w_n.alu_result = m.alu_result;
    w_n.read_data  = read_data_m;
    w_n.pc         = m.pc;
    w_n.csr_val    = m.csr_val;
    w_n.rd         = m.rd;
  end

  always_ff @(posedge clk)
    if (rst || flush_w) w <= '0;
    else                w <= w_n;

  // ================= WB =================
  always_comb begin
    unique case (w.res_src)
      RES_MEM:    result_w = w.read_data;
      RES_ALU:    result_w = w.alu_result;
      RES_PC4:    result_w = w.pc + 32'd4;
      RES_MCAUSE: result_w = w.csr_val;
      RES_MEPC:   result_w = w.csr_val;
      default:    result_w = w.alu_result;
    endcase
  end

  // ================= hazard unit =================
  pl_hazard_unit u_haz (
    .rs1_d(d.instr[19:15]), .rs2_d(d.instr[24:20]), .rd_e(e.rd),
    .ressrc_e(e.res_src), .br_wr_e(e.br_wr), .is_csrw_e(e.is_csrw),
    .pc_src_e, .is_mret_e(e.is_mret), .exc_m,
    .stall_f, .stall_d, .flush_d, .flush_e, .flush_m, .flush_w);

  assign pc_o      = pc_f;
  assign trap_o    = exc_m;
  assign mem_we    = m.mem_wr & ~exc_m & ~dm_e;
  assign mem_addr  = m.alu_result;
  assign mem_wdata = m.write_data;

endmodule
