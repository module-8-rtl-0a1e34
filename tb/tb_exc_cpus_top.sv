// tb_exc_cpus_top: end-to-end test of the three processors together, at the
// default parameters (1024-word memories, reset PC 0x0000d400).
//
// The same test program is loaded into all three. One interrupt is sent to
// the single-cycle processor (while it executes the instruction at
// MAIN_PC+20) and one to the multicycle processor (raised once its PC shows
// MAIN_PC+20, so it is taken at the end of the instruction at MAIN_PC+16,
// and held until the trap is taken). After 1500 cycles every processor sits
// in the final jump-to-self; registers, mepc, mcause and data memory are
// compared with a reference-model run per processor. Every mechanism must
// have happened at least once: each exception cause in each processor, the
// two interrupts, and in the pipeline the load-use and csrrw stalls, branch
// and mret flushes, forwarding, the csrrw->mret mepc bypass, and two
// exceptions in flight at once; in the other two processors, mret and
// csrrw on mepc and on mcause.
module tb_exc_cpus_top;
  import rv_tb_pkg::*;
  import rv_pkg::*;

  localparam int WORDS = 1024;
  logic clk = 0, rst = 1, sc_int = 0, mc_int = 0;
  logic [31:0] sc_pc, sc_mem_addr, sc_mem_wdata, mc_pc, mc_mem_addr, mc_mem_wdata;
  logic [31:0] pl_pc, pl_mem_addr, pl_mem_wdata;
  logic sc_trap, sc_mem_we, mc_trap, mc_mem_we, pl_trap, pl_mem_we;
  int checks = 0, failures = 0;
  int cause_cnt [3][8];          // [core][cause code 0..7], interrupts in slot 7
  int sc_mret = 0, sc_csr_mepc = 0, sc_csr_mcause = 0;
  int mc_mret = 0, mc_csr_mepc = 0, mc_csr_mcause = 0;
  int n_lw_stall = 0, n_csr_stall = 0, n_br_flush = 0, n_mret = 0, n_fwd = 0,
      n_bypass = 0, n_simul = 0;
  bit sc_int_done = 0, mc_int_done = 0;

  exc_cpus_top dut (.*);

  always #5 clk = ~clk;

  rv_iss  iss_sc, iss_mc, iss_pl;
  image_t img;
  logic [31:0] done_pc;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL never happened: %s", what); end
  endtask

  function automatic int slot(logic [31:0] c);
    return c[31] ? 7 : int'(c[2:0]);
  endfunction

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // trap and hazard bookkeeping
  always @(posedge clk) if (!rst) begin
    if (sc_trap) cause_cnt[0][slot(sc_int && !dut.u_sc.exc ? CAUSE_EXT_INTERRUPT : dut.u_sc.cause)]++;
    if (mc_trap) cause_cnt[1][slot(dut.u_mc.cause_d)]++;
    if (pl_trap) cause_cnt[2][slot(dut.u_pl.cause_m)]++;
    if (dut.u_sc.ctrl.is_mret && !dut.u_sc.exc) sc_mret++;
    if (dut.u_sc.ctrl.is_csrw && !dut.u_sc.exc && dut.u_sc.ctrl.res_src == RES_MEPC) sc_csr_mepc++;
    if (dut.u_sc.ctrl.is_csrw && !dut.u_sc.exc && dut.u_sc.ctrl.res_src == RES_MCAUSE) sc_csr_mcause++;
    if (dut.u_mc.u_fsm.state == S11) mc_mret++;
    if (dut.u_mc.u_fsm.state == S13) mc_csr_mepc++;
    if (dut.u_mc.u_fsm.state == S12) mc_csr_mcause++;
    if (dut.u_pl.stall_d &&  dut.u_pl.e.is_csrw) n_csr_stall++;
    if (dut.u_pl.stall_d && !dut.u_pl.e.is_csrw) n_lw_stall++;
    if (dut.u_pl.pc_src_e && dut.u_pl.e.pc != done_pc) n_br_flush++;
    if (dut.u_pl.e.is_mret) n_mret++;
    if (dut.u_pl.e.is_mret && dut.u_pl.m.is_csrw) n_bypass++;
    if (dut.u_pl.fwd_a != 0 || dut.u_pl.fwd_b != 0) n_fwd++;
    if (pl_trap && (dut.u_pl.e.op_err || dut.u_pl.e.mi_err || dut.u_pl.d.mi_err)) n_simul++;
  end

  initial begin
    put_handler(img, WORDS);
    done_pc = put_main(img, WORDS);
    foreach (img[k]) begin
      dut.u_sc.u_imem.mem[k] = img[k];
      dut.u_mc.u_mem.mem[k]  = img[k];
      dut.u_pl.u_imem.mem[k] = img[k];
    end
    iss_sc = new(WORDS, 1'b0, 1'b0); iss_sc.imem = img;
    iss_mc = new(WORDS, 1'b1, 1'b1); iss_mc.dmem = img;
    iss_pl = new(WORDS, 1'b0, 1'b0); iss_pl.imem = img;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 1; i < 32; i++) begin
      iss_sc.x[i] = dut.u_sc.u_rf.regs[i];
      iss_mc.x[i] = dut.u_mc.u_rf.regs[i];
      iss_pl.x[i] = dut.u_pl.u_rf.regs[i];
    end
    for (int c = 0; c < 1500; c++) begin
      @(negedge clk);
      sc_int = !sc_int_done && sc_pc == MAIN_PC + 20;
      if (sc_int) sc_int_done = 1;
      if (mc_trap && mc_int) begin mc_int = 0; mc_int_done = 1; end
      else if (!mc_int_done && mc_pc == MAIN_PC + 20) mc_int = 1;
    end
    // reference runs
    begin
      bit took_sc, took_mc, irq;
      took_sc = 0; took_mc = 0;
      while (iss_sc.pc != done_pc) begin
        irq = !took_sc && iss_sc.pc == MAIN_PC + 20;
        took_sc |= irq;
        iss_sc.step(irq);
      end
      while (iss_mc.pc != done_pc) begin
        irq = !took_mc && iss_mc.pc == MAIN_PC + 16;
        took_mc |= irq;
        iss_mc.step(irq);
      end
      while (iss_pl.pc != done_pc) iss_pl.step(1'b0);
    end
    for (int i = 1; i < 32; i++) begin
      check($sformatf("sc x%0d", i), dut.u_sc.u_rf.regs[i], iss_sc.x[i]);
      check($sformatf("mc x%0d", i), dut.u_mc.u_rf.regs[i], iss_mc.x[i]);
      check($sformatf("pl x%0d", i), dut.u_pl.u_rf.regs[i], iss_pl.x[i]);
    end
    check("sc mepc", dut.u_sc.u_csr.mepc, iss_sc.mepc);
    check("mc mepc", dut.u_mc.u_csr.mepc, iss_mc.mepc);
    check("pl mepc", dut.u_pl.u_csr.mepc, iss_pl.mepc);
    check("sc mcause", dut.u_sc.u_csr.mcause, iss_sc.mcause);
    check("mc mcause", dut.u_mc.u_csr.mcause, iss_mc.mcause);
    check("pl mcause", dut.u_pl.u_csr.mcause, iss_pl.mcause);
    foreach (iss_sc.dmem[k]) check($sformatf("sc dmem %0d", k), dut.u_sc.u_dmem.mem[k], iss_sc.dmem[k]);
    foreach (iss_mc.dmem[k]) check($sformatf("mc mem %0d", k),  dut.u_mc.u_mem.mem[k],  iss_mc.dmem[k]);
    foreach (iss_pl.dmem[k]) check($sformatf("pl dmem %0d", k), dut.u_pl.u_dmem.mem[k], iss_pl.dmem[k]);
    check("sc traps", 32'(cause_cnt[0].sum()), 32'(iss_sc.n_exc + iss_sc.n_int));
    check("mc traps", 32'(cause_cnt[1].sum()), 32'(iss_mc.n_exc + iss_mc.n_int));
    check("pl traps", 32'(cause_cnt[2].sum()), 32'(iss_pl.n_exc));
    for (int core = 0; core < 3; core++) begin
      need($sformatf("core %0d misaligned fetch", core), cause_cnt[core][0]);
      need($sformatf("core %0d illegal instruction", core), cause_cnt[core][2]);
      need($sformatf("core %0d misaligned load", core), cause_cnt[core][4]);
      need($sformatf("core %0d misaligned store", core), cause_cnt[core][6]);
    end
    need("sc interrupt", cause_cnt[0][7]);
    need("mc interrupt", cause_cnt[1][7]);
    need("sc mret", sc_mret);
    need("sc csrrw mepc", sc_csr_mepc);
    need("sc csrrw mcause", sc_csr_mcause);
    need("mc mret (S11)", mc_mret);
    need("mc csrrw mepc (S13)", mc_csr_mepc);
    need("mc csrrw mcause (S12)", mc_csr_mcause);
    need("pl load-use stall", n_lw_stall);
    need("pl csrrw stall", n_csr_stall);
    need("pl branch/jal flush", n_br_flush);
    need("pl mret flush", n_mret);
    need("pl forwarding", n_fwd);
    need("pl csrrw->mret mepc bypass", n_bypass);
    need("pl simultaneous exceptions", n_simul);
    $display("traps sc=%p mc=%p pl=%p", cause_cnt[0], cause_cnt[1], cause_cnt[2]);
    $display("sc: mret=%0d csrrw_mepc=%0d csrrw_mcause=%0d  mc: mret=%0d csrrw_mepc=%0d csrrw_mcause=%0d",
             sc_mret, sc_csr_mepc, sc_csr_mcause, mc_mret, mc_csr_mepc, mc_csr_mcause);
    $display("pl: lw_stall=%0d csrrw_stall=%0d br_flush=%0d mret=%0d fwd=%0d bypass=%0d simultaneous=%0d",
             n_lw_stall, n_csr_stall, n_br_flush, n_mret, n_fwd, n_bypass, n_simul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
