// tb_pl_cpu: self-checking test of the pipelined processor.
//
// Runs the common test program until the final jump-to-self and compares the
// registers, mepc, mcause, data memory and the ordered list of traps
// (mepc, mcause) with the reference model. Timing checks from the pipeline
// diagrams: an exception is taken when the instruction is in MEM, three
// cycles after it was fetched, and the trap vector is fetched in the next
// cycle; an mret in EX redirects the next fetch to mepc, so it costs two
// cycles. Each hazard mechanism is counted and must occur: load-use stall,
// csrrw-use stall, branch/jal flush, mret flush, forwarding from MEM and WB,
// an mret reading the mepc written by a csrrw in MEM in the same cycle, two
// exceptions pending at once, and an exception found in a younger
// instruction before the older one's.
module tb_pl_cpu;
  import rv_tb_pkg::*;
  import rv_pkg::*;

  localparam int WORDS = 1024;
  logic clk = 0, rst = 1;
  logic [31:0] pc, mem_addr, mem_wdata;
  logic trap, mem_we;
  int checks = 0, failures = 0, cycles = 0, same = 0;
  int n_lw_stall = 0, n_csr_stall = 0, n_br_flush = 0, n_mret = 0, n_fwd_m = 0,
      n_fwd_w = 0, n_mepc_bypass = 0, n_simul = 0, n_ooo = 0;
  int last_fetch [logic [31:0]];
  logic [31:0] dut_epc [$], dut_cause [$];

  pl_cpu #(.IMEM_WORDS(WORDS), .DMEM_WORDS(WORDS)) dut (
    .clk, .rst, .pc_o(pc), .trap_o(trap), .mem_we, .mem_addr, .mem_wdata);

  always #5 clk = ~clk;

  rv_iss       iss;
  image_t      img;
  logic [31:0] done_pc;
  logic        pend_trap, pend_mret;
  logic [31:0] pend_mepc;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    put_handler(img, WORDS);
    done_pc = put_main(img, WORDS);
    foreach (img[k]) dut.u_imem.mem[k] = img[k];
    iss = new(WORDS, 1'b0, 1'b0);
    iss.imem = img;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 1; i < 32; i++) iss.x[i] = dut.u_rf.regs[i];
    pend_trap = 0; pend_mret = 0;
    while (same < 3 && cycles < 4000) begin
      @(negedge clk);
      #1;
      cycles++;
      // timing checks for the events of the previous cycle
      if (pend_trap) begin
        check("fetch from mtvec after trap", pc, MTVEC);
        dut_epc.push_back(dut.u_csr.mepc);
        dut_cause.push_back(dut.u_csr.mcause);
      end
      if (pend_mret) check("fetch from mepc after mret", pc, pend_mepc);
      pend_trap = trap;
      pend_mret = dut.e.is_mret & ~trap;
      pend_mepc = dut.u_csr.mepc;
      if (trap) begin
        checks++;
        if (!last_fetch.exists(dut.m.pc) || cycles - last_fetch[dut.m.pc] != 3) begin
          failures++;
          $display("FAIL exception of %h not taken 3 cycles after its fetch", dut.m.pc);
        end
        if (dut.e.mi_err | dut.e.op_err | dut.d.mi_err | dut.u_alu.e & (dut.e.alu_ctrl != 0))
          n_simul++;
      end
      if (dut.e.is_mret) begin
        checks++;
        if (cycles - last_fetch[dut.e.pc] != 2) begin
          failures++;
          $display("FAIL mret at %h not in EX 2 cycles after fetch", dut.e.pc);
        end
        if (!trap) n_mret++;
        if (dut.m.is_csrw && dut.m.csr == 12'h341) n_mepc_bypass++;
      end
      // younger instruction flagged while an older one is still to fault in MEM
      if ((dut.e.op_err || dut.e.mi_err) && dut.m.res_src == RES_MEM && dut.m.br_wr &&
          dut.m.alu_result[1:0] != 0 && !trap) n_ooo++;
      if (dut.e.op_err && dut.u_dmem.e && dut.m.br_wr && dut.m.res_src == RES_MEM) n_ooo++;
      if (dut.stall_d && dut.e.is_csrw)  n_csr_stall++;
      if (dut.stall_d && !dut.e.is_csrw) n_lw_stall++;
      if (dut.pc_src_e && !trap && dut.e.pc != done_pc) n_br_flush++;
      if (dut.fwd_a == 2'b10 || dut.fwd_b == 2'b10) n_fwd_m++;
      if (dut.fwd_a == 2'b01 || dut.fwd_b == 2'b01) n_fwd_w++;
      last_fetch[pc] = cycles;
      if (dut.e.jump && dut.e.pc == done_pc) same++;   // final jump-to-self in EX
    end
    // reference run
    while (iss.pc != done_pc && iss.trap_cause.size() < 100) iss.step(1'b0);
    for (int i = 1; i < 32; i++) check($sformatf("x%0d", i), dut.u_rf.regs[i], iss.x[i]);
    check("mepc", dut.u_csr.mepc, iss.mepc);
    check("mcause", dut.u_csr.mcause, iss.mcause);
    foreach (iss.dmem[k]) check($sformatf("dmem word %0d", k), dut.u_dmem.mem[k], iss.dmem[k]);
    check("number of traps", 32'(dut_cause.size()), 32'(iss.trap_cause.size()));
    foreach (iss.trap_cause[k]) if (k < dut_cause.size()) begin
      check($sformatf("trap %0d mepc", k), dut_epc[k], iss.trap_epc[k]);
      check($sformatf("trap %0d mcause", k), dut_cause[k], iss.trap_cause[k]);
    end
    check("exceptions expected", 32'(iss.n_exc), 32'd9);
    $display("cycles=%0d lw_stall=%0d csrrw_stall=%0d br_flush=%0d mret=%0d fwd_mem=%0d fwd_wb=%0d mepc_bypass=%0d simultaneous=%0d out_of_order=%0d",
             cycles, n_lw_stall, n_csr_stall, n_br_flush, n_mret, n_fwd_m, n_fwd_w, n_mepc_bypass, n_simul, n_ooo);
    checks++; if (n_lw_stall == 0)    begin failures++; $display("FAIL no load-use stall"); end
    checks++; if (n_csr_stall == 0)   begin failures++; $display("FAIL no csrrw stall"); end
    checks++; if (n_br_flush == 0)    begin failures++; $display("FAIL no branch flush"); end
    checks++; if (n_mret == 0)        begin failures++; $display("FAIL no mret"); end
    checks++; if (n_fwd_m == 0)       begin failures++; $display("FAIL no MEM forwarding"); end
    checks++; if (n_fwd_w == 0)       begin failures++; $display("FAIL no WB forwarding"); end
    checks++; if (n_mepc_bypass == 0) begin failures++; $display("FAIL no csrrw->mret mepc hazard"); end
    checks++; if (n_simul == 0)       begin failures++; $display("FAIL no simultaneous exceptions"); end
    checks++; if (n_ooo == 0)         begin failures++; $display("FAIL no out-of-order exception"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
