// tb_csr_unit: self-checking test of the CSR unit. Two copies are driven
// with the same random write enables and data for 2000 cycles: one writing
// mepc on the rising edge and one on the falling edge. mepc and mcause are
// compared with a model; mtvec must stay 0x1c000000; csr_rdata must return
// mcause for address 0x342 and mepc otherwise. Reset must clear both
// registers. A watchdog ends a hung run.
module tb_csr_unit;
  import rv_pkg::*;
  logic clk = 0, rst = 1, epc_we, cause_we;
  logic [31:0] epc_d, cause_d;
  logic [11:0] csr_addr;
  logic [31:0] p_mepc, p_mcause, p_mtvec, p_rdata, n_mepc, n_mcause, n_mtvec, n_rdata;
  logic [31:0] m_epc, m_cause;
  int checks = 0, failures = 0;

  csr_unit #(.MEPC_NEGEDGE(1'b0)) u_pos (.clk, .rst, .epc_we, .epc_d, .cause_we, .cause_d, .csr_addr,
    .mepc(p_mepc), .mcause(p_mcause), .mtvec(p_mtvec), .csr_rdata(p_rdata));
  csr_unit #(.MEPC_NEGEDGE(1'b1)) u_neg (.clk, .rst, .epc_we, .epc_d, .cause_we, .cause_d, .csr_addr,
    .mepc(n_mepc), .mcause(n_mcause), .mtvec(n_mtvec), .csr_rdata(n_rdata));

  always #5 clk = ~clk;

  initial begin : watchdog
    #1_000_000 failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  initial begin
    epc_we = 0; cause_we = 0; epc_d = 0; cause_d = 0; csr_addr = 0;
    repeat (2) @(posedge clk);
    #1;
    check("reset mepc", p_mepc, 0); check("reset mcause", p_mcause, 0);
    check("reset neg mepc", n_mepc, 0);
    rst = 0; m_epc = 0; m_cause = 0;
    repeat (2000) begin
      epc_we = 1'($urandom_range(0, 1)); cause_we = 1'($urandom_range(0, 1));
      epc_d = $urandom; cause_d = $urandom;
      csr_addr = $urandom_range(0, 1) != 0 ? CSR_MCAUSE : 12'($urandom);
      #1;
      check("pos rdata", p_rdata, csr_addr == CSR_MCAUSE ? m_cause : m_epc);
      check("mtvec", p_mtvec, 32'h1c00_0000);
      check("neg mtvec", n_mtvec, 32'h1c00_0000);
      @(negedge clk) #1;
      check("neg mepc after falling edge", n_mepc, epc_we ? epc_d : m_epc);
      check("pos mepc before rising edge", p_mepc, m_epc);
      @(posedge clk) #1;
      if (epc_we) m_epc = epc_d;
      if (cause_we) m_cause = cause_d;
      check("pos mepc", p_mepc, m_epc);
      check("pos mcause", p_mcause, m_cause);
      check("neg mcause", n_mcause, m_cause);
      check("neg rdata", n_rdata, csr_addr == CSR_MCAUSE ? m_cause : m_epc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
