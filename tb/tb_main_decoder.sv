// tb_main_decoder: self-checking test of the main decoder. Each supported
// instruction class (lw, sw, OP-IMM, R-type, beq, jal, mret, csrrw mcause,
// csrrw mepc) is applied and every control field is compared with the
// expected row; an unknown opcode and unsupported system instructions must
// produce all-zero controls (no register or memory write, no jump).
// Combinational; a watchdog ends a hung run.
module tb_main_decoder;
  import rv_pkg::*;
  logic [6:0] op;
  logic [2:0] funct3;
  logic [11:0] csr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  main_decoder dut (.*);

  initial begin : watchdog
    #1_000_000 failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected fields packed in the order of ctrl_t
  function automatic ctrl_t row(bit br, bit j, bit rw, bit src, aluop_e aop,
                                bit mw, res_src_e rs, bit mret, bit csrw,
                                imm_src_e imm);
    ctrl_t c;
    c = '{br, j, rw, src, aop, mw, rs, mret, csrw, imm};
    return c;
  endfunction

  task automatic apply(string name, logic [6:0] o, logic [2:0] f3,
                       logic [11:0] c, ctrl_t exp);
    op = o; funct3 = f3; csr = c;
    #1;
    checks++;
    if (ctrl !== exp) begin
      failures++;
      $display("FAIL %s: got %p expected %p", name, ctrl, exp);
    end
  endtask

  initial begin
    apply("lw",    OP_LOAD,   3'b010, 12'h004, row(0,0,1,1,ALUOP_ADD,0,RES_MEM,0,0,IMM_I));
    apply("sw",    OP_STORE,  3'b010, 12'h008, row(0,0,0,1,ALUOP_ADD,1,RES_MEM,0,0,IMM_S));
    apply("addi",  OP_IMM,    3'b000, 12'h005, row(0,0,1,1,ALUOP_OPERATE,0,RES_ALU,0,0,IMM_I));
    apply("add",   OP_REG,    3'b000, 12'h000, row(0,0,1,0,ALUOP_OPERATE,0,RES_ALU,0,0,IMM_I));
    apply("beq",   OP_BRANCH, 3'b000, 12'h010, row(1,0,0,0,ALUOP_SUB,0,RES_MEM,0,0,IMM_B));
    apply("jal",   OP_JAL,    3'b000, 12'h100, row(0,1,1,0,ALUOP_ADD,0,RES_PC4,0,0,IMM_J));
    apply("mret",  OP_SYSTEM, 3'b000, 12'h302, row(0,0,0,0,ALUOP_ADD,0,RES_MEM,1,0,IMM_I));
    apply("csrrw mcause", OP_SYSTEM, 3'b001, 12'h342, row(0,0,1,0,ALUOP_ADD,0,RES_MCAUSE,0,1,IMM_I));
    apply("csrrw mepc",   OP_SYSTEM, 3'b001, 12'h341, row(0,0,1,0,ALUOP_ADD,0,RES_MEPC,0,1,IMM_I));
    apply("ecall",  OP_SYSTEM, 3'b000, 12'h000, '0);
    apply("csrrw mtvec", OP_SYSTEM, 3'b001, 12'h305, '0);
    apply("csrrs",  OP_SYSTEM, 3'b010, 12'h341, '0);
    for (int o = 0; o < 128; o++)
      if (!(7'(o) inside {OP_LOAD, OP_STORE, OP_IMM, OP_REG, OP_BRANCH, OP_JAL, OP_SYSTEM}))
        apply($sformatf("opcode %b", 7'(o)), 7'(o), 3'($urandom), 12'($urandom), '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
