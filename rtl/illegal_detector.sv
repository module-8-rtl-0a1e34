// illegal_detector: flags instructions the reduced processor does not know.
//
// It looks at the opcode instr[6:0], funct3 instr[14:12] and the 12-bit field
// instr[31:20] (the CSR number of system instructions). E stays low for lw,
// sw, I-type ALU, R-type ALU, beq and jal, for mret (funct3 000, field 0x302)
// and for csrrw (funct3 001) on mepc (0x341) or mcause (0x342); everything
// else (lui, auipc, jalr, ecall, other CSRs, other csr* forms...) raises E.
// This design also raises E for an R-type whose funct7 (instr[31:25]) is
// neither 0000000 nor 0100000, so that mul and the other M-extension
// instructions, which share the R-type opcode, are rejected as the processors
// require. Purely combinational.
module illegal_detector
  import rv_pkg::*;
(
  input  logic [6:0]  op,
  input  logic [2:0]  funct3,
  input  logic [11:0] csr,
  output logic        e
);

  always_comb begin
    unique case (op)
      OP_LOAD, OP_STORE, OP_IMM, OP_BRANCH, OP_JAL: e = 1'b0;
      OP_REG:    e = !(csr[11:5] == 7'b0000000 || csr[11:5] == 7'b0100000);
      OP_SYSTEM: begin
        if (funct3 == F3_PRIV)
          e = (csr != CSR_MRET_IMM);
        else if (funct3 == F3_CSRRW)
          e = !(csr == CSR_MEPC || csr == CSR_MCAUSE);
        else
          e = 1'b1;
      end
      default:   e = 1'b1;
    endcase
  end

endmodule
