// cause_encoder: the exception controller's cause ENC. It turns the error
// flags raised by the instruction memory (MIErr), the illegal-instruction
// detector (OpErr), the ALU (ALUErr) and the data memory (MDErr) into the
// 32-bit value stored in mcause, and raises exc when any flag is set.
//
// Priority follows the order in which an instruction meets the units:
// MIErr -> 0 (misaligned fetch), else OpErr or ALUErr -> 2 (illegal
// instruction), else MDErr -> 4 for a load or 6 for a store (selected by
// MemWr). With no flag set, cause is 0 and exc is low. Purely combinational.
// Only bits 2:1 of cause can be non-zero, so synthesis finds the other 30
// output bits constant; the full 32-bit width is that of mcause.
module cause_encoder
  import rv_pkg::*;
(
  input  logic        mi_err,
  input  logic        op_err,
  input  logic        alu_err,
  input  logic        md_err,
  input  logic        mem_wr,
  output logic [31:0] cause,
  output logic        exc
);

  always_comb begin
    if (mi_err)                 cause = CAUSE_MISALIGNED_FETCH;
    else if (op_err || alu_err) cause = CAUSE_ILLEGAL_INSTR;
    else if (md_err)            cause = mem_wr ? CAUSE_MISALIGNED_STORE
                                               : CAUSE_MISALIGNED_LOAD;
    else                        cause = '0;
  end

  assign exc = mi_err | op_err | alu_err | md_err;

endmodule
