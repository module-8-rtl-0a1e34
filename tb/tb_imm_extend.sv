// tb_imm_extend: self-checking test of the immediate extender. For 3000
// random instruction words and each format (I, S, B, J) the output is
// compared with the immediate rebuilt here from the RISC-V bit layout.
// Combinational; a watchdog ends a hung run.
module tb_imm_extend;
  import rv_pkg::*;
  logic [31:7] instr;
  imm_src_e imm_src;
  logic [31:0] imm;
  int checks = 0, failures = 0;

  imm_extend dut (.*);

  initial begin : watchdog
    #10_000_000 failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w, exp;
    repeat (3000) begin
      w = $urandom;
      for (int s = 0; s < 4; s++) begin
        instr = w[31:7]; imm_src = imm_src_e'(s);
        #1;
        unique case (s)
          0: exp = 32'($signed(w[31:20]));
          1: exp = 32'($signed({w[31:25], w[11:7]}));
          2: exp = 32'($signed({w[31], w[7], w[30:25], w[11:8], 1'b0}));
          3: exp = 32'($signed({w[31], w[19:12], w[20], w[30:21], 1'b0}));
        endcase
        checks++;
        if (imm !== exp) begin
          failures++;
          $display("FAIL instr=%h src=%0d: imm=%h expected %h", w, s, imm, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
