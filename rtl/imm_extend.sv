// imm_extend: sign extension of the instruction immediates (the data paths'
// "Sign extension" box). imm_src selects the format: I (lw, addi...), S (sw),
// B (beq, byte offset with bit 0 = 0) or J (jal, byte offset with bit 0 = 0).
// instr is the instruction without its opcode bits. Purely combinational.
//
// Bit layouts are the standard RISC-V ones (the data path names the box but
// does not detail it); the 2-bit ImmSrc encoding (00 I, 01 S, 10 B, 11 J) is
// this design's choice, shared through rv_pkg.
module imm_extend
  import rv_pkg::*;
(
  input  logic [31:7] instr,
  input  imm_src_e    imm_src,
  output logic [31:0] imm
);

  always_comb begin
    unique case (imm_src)
      IMM_I: imm = {{20{instr[31]}}, instr[31:20]};
      IMM_S: imm = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      IMM_B: imm = {{20{instr[31]}}, instr[7], instr[30:25], instr[11:8], 1'b0};
      IMM_J: imm = {{12{instr[31]}}, instr[19:12], instr[20], instr[30:21], 1'b0};
      default: imm = '0;
    endcase
  end

endmodule
