// alu: 32-bit ALU of the reduced RISC-V processors, with an error output.
//
// Operations, selected by the 3-bit code op: 000 A+B, 001 A-B, 010 A&B,
// 011 A|B, 101 signed set-less-than. The codes 100, 110 and 111 name no
// implemented operation; the ALU raises E for them, which the processors
// turn into an illegal-instruction exception (cause 2). E is the two-level
// function (op1 & op2) | (op2 & ~op0). z is high when the result is zero (used
// by beq). For the unimplemented codes the result R is 0, a choice of this
// design. Purely combinational.
module alu
  import rv_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_op_e     op,
  output logic [31:0] r,
  output logic        z,
  output logic        e
);

  always_comb begin
    unique case (op)
      ALU_ADD: r = a + b;
      ALU_SUB: r = a - b;
      ALU_AND: r = a & b;
      ALU_OR:  r = a | b;
      ALU_SLT: r = {31'b0, $signed(a) < $signed(b)};
      default: r = '0;
    endcase
  end

  assign z = (r == '0);
  assign e = (op[1] & op[2]) | (op[2] & ~op[0]);

endmodule
