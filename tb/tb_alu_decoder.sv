// tb_alu_decoder: self-checking test of the ALU decoder.
// Sweeps every combination of ALUOp (2 bits), funct3, funct7 bit 5 and
// opcode bit 5 and compares the 3-bit ALU operation with a reference table:
// ALUOp 00 -> add, 01 -> sub, 10 -> decided by funct3 (add or sub for 000,
// slt for 010, or for 110, and for 111, the unimplemented code 111 for every
// other funct3), 11 -> add. Combinational; a watchdog ends a hung run.
module tb_alu_decoder;
  import rv_pkg::*;
  aluop_e alu_op;
  logic [2:0] funct3;
  logic funct7_b5, op_b5;
  alu_op_e alu_ctrl;
  int checks = 0, failures = 0;

  alu_decoder dut (.*);

  initial begin : watchdog
    #1_000_000 failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp;
    for (int v = 0; v < 128; v++) begin
      {alu_op, funct3, funct7_b5, op_b5} = 7'(v);
      #1;
      unique case (alu_op)
        2'b00: exp = 3'b000;
        2'b01: exp = 3'b001;
        2'b10: unique case (funct3)
          3'b000:  exp = (funct7_b5 && op_b5) ? 3'b001 : 3'b000;
          3'b010:  exp = 3'b101;
          3'b110:  exp = 3'b011;
          3'b111:  exp = 3'b010;
          default: exp = 3'b111;
        endcase
        default: exp = 3'b000;
      endcase
      checks++;
      if (alu_ctrl !== exp) begin
        failures++;
        $display("FAIL aluop=%b f3=%b f7b5=%b opb5=%b: got %b expected %b",
                 alu_op, funct3, funct7_b5, op_b5, alu_ctrl, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
