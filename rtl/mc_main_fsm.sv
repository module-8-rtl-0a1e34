// mc_main_fsm: main controller FSM of the multicycle processor with exception
// and interrupt handling.
//
// States (one clock each):
//   S0  fetch: IR <- Mem[PC], OldPC <- PC, PC <- PC+4   (misaligned PC -> SE)
//   S1  decode: ALUOut <- OldPC+imm; illegal instruction -> SE
//   S2  address: ALUOut <- A+imm        S3 load: MDR <- Mem[ALUOut] (-> SE)
//   S4  load write-back                 S5 store (misaligned -> SE)
//   S6  R-type execute (-> SE)          S7 ALU write-back
//   S8  I-type execute (-> SE)          S9 jal: PC <- target, ALUOut <- OldPC+4
//   S10 beq                             S11 mret: PC <- mepc
//   S12 csrrw rd, mcause                S13 csrrw rd, mepc: mepc <- A
//   SE  exception: mepc <- OldPC, PC <- mtvec, mcause <- cause
//   SI  interrupt: mepc <- PC (next instruction), PC <- mtvec, mcause <- cause
// The final states S4, S5, S7 and S10 go to SI instead of S0 when int_i is
// high; every other path ends in S0. The transition and output tables are
// the processor's own; entries left open there are driven 0. The interrupt
// test of S7 and S10 ignores m_err, since those states make no memory
// access. Moore outputs; synchronous active-high reset to S0.
//
// Output encodings: alu_src_a 00 PC, 01 OldPC, 10 A; alu_src_b 00 B, 01 imm,
// 10 constant 4; res_src 000 ALUOut, 001 MDR, 010 ALU result, 011 mtvec,
// 100 mepc, 101 mcause.
module mc_main_fsm
  import rv_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [6:0]  op,
  input  logic [2:0]  funct3,
  input  logic [11:0] csr,
  input  logic        m_err,
  input  logic        op_err,
  input  logic        alu_err,
  input  logic        int_i,
  output mc_state_e   state,
  output logic        branch,
  output logic        pc_update,
  output logic        addr_src,
  output logic        mem_wr,
  output logic        ir_wr,
  output logic        br_wr,
  output logic [1:0]  alu_src_a,
  output logic [1:0]  alu_src_b,
  output aluop_e      alu_op,
  output logic [2:0]  res_src,
  output logic        cause_wr,
  output logic        epc_wr
);

  mc_state_e next;

  always_ff @(posedge clk)
    if (rst) state <= S0;
    else     state <= next;

  // ---------------- transition function ----------------
  always_comb begin
    next = S0;
    unique case (state)
      S0:  next = m_err ? SE : S1;
      S1: begin
        if (op_err) next = SE;
        else if (op == OP_LOAD || op == OP_STORE)            next = S2;
        else if (op == OP_IMM)                               next = S8;
        else if (op == OP_REG)                               next = S6;
        else if (op == OP_JAL)                               next = S9;
        else if (op == OP_BRANCH)                            next = S10;
        else if (op == OP_SYSTEM && funct3 == F3_PRIV && csr == CSR_MRET_IMM)
                                                             next = S11;
        else if (op == OP_SYSTEM && funct3 == F3_CSRRW && csr == CSR_MCAUSE)
                                                             next = S12;
        else if (op == OP_SYSTEM && funct3 == F3_CSRRW && csr == CSR_MEPC)
                                                             next = S13;
        else                                                 next = SE;
      end
      S2:  next = (op == OP_STORE) ? S5 : S3;
      S3:  next = m_err ? SE : S4;
      S4:  next = int_i ? SI : S0;
      S5:  next = m_err ? SE : (int_i ? SI : S0);
      S6:  next = alu_err ? SE : S7;
      S7:  next = int_i ? SI : S0;
      S8:  next = alu_err ? SE : S7;
      S9:  next = S7;
      S10: next = int_i ? SI : S0;
      default: next = S0;   // S11, S12, S13, SE, SI
    endcase
  end

  // ---------------- output function ----------------
  always_comb begin
    branch = 1'b0; pc_update = 1'b0; addr_src = 1'b0; mem_wr = 1'b0;
    ir_wr = 1'b0; br_wr = 1'b0; alu_src_a = 2'b00; alu_src_b = 2'b00;
    alu_op = ALUOP_ADD; res_src = 3'b000; cause_wr = 1'b0; epc_wr = 1'b0;
    unique case (state)
      S0:  begin pc_update = 1'b1; ir_wr = 1'b1; alu_src_b = 2'b10;
                 res_src = 3'b010; end
      S1:  begin alu_src_a = 2'b01; alu_src_b = 2'b01; end
      S2:  begin alu_src_a = 2'b10; alu_src_b = 2'b01; end
      S3:  begin addr_src = 1'b1; end
      S4:  begin br_wr = 1'b1; res_src = 3'b001; end
      S5:  begin addr_src = 1'b1; mem_wr = 1'b1; end
      S6:  begin alu_src_a = 2'b10; alu_op = ALUOP_OPERATE; end
      S7:  begin br_wr = 1'b1; end
      S8:  begin alu_src_a = 2'b10; alu_src_b = 2'b01; alu_op = ALUOP_OPERATE; end
      S9:  begin pc_update = 1'b1; alu_src_a = 2'b01; alu_src_b = 2'b10; end
      S10: begin branch = 1'b1; alu_src_a = 2'b10; alu_op = ALUOP_SUB; end
      S11: begin pc_update = 1'b1; res_src = 3'b100; end
      S12: begin br_wr = 1'b1; res_src = 3'b101; end
      S13: begin br_wr = 1'b1; alu_src_a = 2'b10; res_src = 3'b100;
                 epc_wr = 1'b1; end
      SE:  begin pc_update = 1'b1; alu_src_a = 2'b01; res_src = 3'b011;
                 cause_wr = 1'b1; epc_wr = 1'b1; end
      SI:  begin pc_update = 1'b1; alu_src_a = 2'b00; res_src = 3'b011;
                 cause_wr = 1'b1; epc_wr = 1'b1; end
      default: ;
    endcase
  end

endmodule
