// tb_cause_encoder: self-checking test of the cause encoder. All 32
// combinations of MIErr, OpErr, ALUErr, MDErr and MemWr are applied; the
// reference gives cause 0 for a misaligned fetch, 2 for an illegal
// instruction (OpErr or ALUErr), 4 or 6 for a misaligned load or store, in
// that priority, and exc when any error flag is set. Combinational.
module tb_cause_encoder;
  import rv_pkg::*;
  logic mi_err, op_err, alu_err, md_err, mem_wr, exc;
  logic [31:0] cause;
  int checks = 0, failures = 0;

  cause_encoder dut (.*);

  initial begin : watchdog
    #1_000_000 failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    for (int v = 0; v < 32; v++) begin
      {mi_err, op_err, alu_err, md_err, mem_wr} = 5'(v);
      #1;
      exp = mi_err ? 0 : (op_err | alu_err) ? 2 : md_err ? (mem_wr ? 6 : 4) : 0;
      checks++;
      if (cause !== exp || exc !== (mi_err | op_err | alu_err | md_err)) begin
        failures++;
        $display("FAIL flags=%b: cause=%h exc=%b expected %h", 5'(v), cause, exc, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
