// main_decoder: main control decoder of the single-cycle processor, reused by
// the ID stage of the pipelined processor.
//
// From the opcode, funct3 and the CSR field instr[31:20] it produces the
// control word: Branch, Jump, BRwr (register write), ALUsrc, ALUOp, MemWr,
// ResSrc (000 memory, 001 ALU, 010 PC+4, 011 mcause, 100 mepc), isMret and
// isCsrw, as in the processor's decoder table; mret is recognised with field
// 0x302, csrrw with 0x341 (mepc) or 0x342 (mcause). Unknown instructions give
// an all-zero word (nothing written), leaving their rejection to the illegal
// instruction detector. The don't-care entries of the table are given 0
// here, and the immediate format (ImmSrc, not part of that table) is derived
// from the opcode by this design. Purely combinational.
module main_decoder
  import rv_pkg::*;
(
  input  logic [6:0]  op,
  input  logic [2:0]  funct3,
  input  logic [11:0] csr,
  output ctrl_t       ctrl
);

  always_comb begin
    ctrl = '0;   // branch=jump=br_wr=mem_wr=0, alu_op=add, res_src=000, imm_src=I
    unique case (op)
      OP_LOAD: begin
        ctrl.br_wr = 1'b1; ctrl.alu_src = 1'b1; ctrl.res_src = RES_MEM;
      end
      OP_STORE: begin
        ctrl.alu_src = 1'b1; ctrl.mem_wr = 1'b1; ctrl.imm_src = IMM_S;
      end
      OP_IMM: begin
        ctrl.br_wr = 1'b1; ctrl.alu_src = 1'b1; ctrl.alu_op = ALUOP_OPERATE;
        ctrl.res_src = RES_ALU;
      end
      OP_REG: begin
        ctrl.br_wr = 1'b1; ctrl.alu_op = ALUOP_OPERATE; ctrl.res_src = RES_ALU;
      end
      OP_BRANCH: begin
        ctrl.branch = 1'b1; ctrl.alu_op = ALUOP_SUB; ctrl.imm_src = IMM_B;
      end
      OP_JAL: begin
        ctrl.jump = 1'b1; ctrl.br_wr = 1'b1; ctrl.res_src = RES_PC4;
        ctrl.imm_src = IMM_J;
      end
      OP_SYSTEM: begin
        if (funct3 == F3_PRIV && csr == CSR_MRET_IMM)
          ctrl.is_mret = 1'b1;
        else if (funct3 == F3_CSRRW && csr == CSR_MCAUSE) begin
          ctrl.br_wr = 1'b1; ctrl.res_src = RES_MCAUSE; ctrl.is_csrw = 1'b1;
        end else if (funct3 == F3_CSRRW && csr == CSR_MEPC) begin
          ctrl.br_wr = 1'b1; ctrl.res_src = RES_MEPC; ctrl.is_csrw = 1'b1;
        end
      end
      default: ctrl = '0;
    endcase
  end

endmodule
