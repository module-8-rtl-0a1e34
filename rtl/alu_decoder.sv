// alu_decoder: turns the 2-bit ALUOp of the main decoder (or of the multicycle
// FSM) and the instruction's funct3/funct7 into the ALU's 3-bit operation.
//
// ALUOp 00 -> add (address and PC arithmetic), 01 -> subtract (beq),
// 10 -> operate: funct3 000 add (sub when an R-type has funct7 bit 5 set),
// 010 slt, 110 or, 111 and. Every other funct3 (sll, sltu, xor, srl/sra and
// their immediate forms) is not implemented by the reduced processor; it is
// mapped to ALU code 111, which makes the ALU raise its error flag. The exact
// mapping onto the ALU codes is this design's choice; that unimplemented
// operations must reach the ALU as an erroneous code follows the processors'
// exception scheme. Purely combinational.
module alu_decoder
  import rv_pkg::*;
(
  input  aluop_e      alu_op,
  input  logic [2:0]  funct3,
  input  logic        funct7_b5,
  input  logic        op_b5,      // instr[5]: 1 for R-type
  output alu_op_e     alu_ctrl
);

  always_comb begin
    unique case (alu_op)
      ALUOP_ADD: alu_ctrl = ALU_ADD;
      ALUOP_SUB: alu_ctrl = ALU_SUB;
      ALUOP_OPERATE:
        unique case (funct3)
          3'b000:  alu_ctrl = (op_b5 & funct7_b5) ? ALU_SUB : ALU_ADD;
          3'b010:  alu_ctrl = ALU_SLT;
          3'b110:  alu_ctrl = ALU_OR;
          3'b111:  alu_ctrl = ALU_AND;
          default: alu_ctrl = ALU_BAD7;
        endcase
      default:   alu_ctrl = ALU_ADD;
    endcase
  end

endmodule
