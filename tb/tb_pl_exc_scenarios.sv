// tb_pl_exc_scenarios: cycle-exact replay of the five exception scenarios
// that define precise exceptions in the pipelined processor.
//
// Each scenario is a short program at 0x0000d400 whose instruction at
// 0x0000d404 is the one that must be blamed; the trap routine at mtvec sets
// x31 and spins. Cycle 1 is the cycle in which 0x0000d400 is fetched. For
// every scenario the bench checks the cycle in which the exception is taken
// (faulting instruction in MEM), that the word at mtvec is fetched in the
// very next cycle, mepc = 0x0000d404, the cause, which younger instruction
// was in ID or EX at that moment (to show the race really happened), and
// that no younger instruction wrote the register file while every older one
// did:
//   1 misaligned lw at d404                     -> trap in cycle 5, cause 4
//   2 mul at d404 (illegal, seen in ID)         -> trap in cycle 5, cause 2
//   3 lw at d404 in MEM while mul is in ID      -> trap in cycle 5, cause 4
//   4 xor at d404 then sra (both fail in EX)    -> trap in cycle 5, cause 2
//   5 mul at d40c flagged in ID one cycle before the older lw at d404
//     fails in MEM                              -> trap in cycle 5, cause 4
// The processor is used at its default parameters; a watchdog ends a hung
// run.
module tb_pl_exc_scenarios;
  import rv_tb_pkg::*;

  localparam int WORDS = 1024;
  logic clk = 0, rst = 1;
  logic [31:0] pc, mem_addr, mem_wdata;
  logic trap, mem_we;
  int checks = 0, failures = 0;

  pl_cpu dut (.clk, .rst, .pc_o(pc), .trap_o(trap), .mem_we, .mem_addr, .mem_wdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Runs one program; rs values of x1..x4 are set before it starts.
  // racer_pc: address of the younger instruction that must sit in ID
  // (racer_in_ex = 0) or EX (racer_in_ex = 1) in the trap cycle;
  // racer_err: whether that instruction's own error flag (illegal opcode in
  // ID, illegal opcode or ALU error in EX) is already raised then.
  task automatic run(string name, logic [31:0] prog [$], logic [31:0] cause,
                     logic [31:0] racer_pc, bit racer_in_ex, bit racer_err,
                     int written [$], int untouched [$]);
    int c, trap_cycle, vec_cycle;
    logic [31:0] prev_rf [32];
    logic [31:0] racer_seen;
    logic racer_flag;
    rst = 1;
    for (int i = 0; i < WORDS; i++) dut.u_imem.mem[i] = ADDI(0, 0, 0);
    dut.u_imem.mem[widx(MTVEC, WORDS)]     = ADDI(31, 0, 1);
    dut.u_imem.mem[widx(MTVEC + 4, WORDS)] = JAL(0, 0);
    foreach (prog[k]) dut.u_imem.mem[widx(MAIN_PC + 4 * k, WORDS)] = prog[k];
    for (int i = 1; i < 32; i++) dut.u_rf.regs[i] = 32'(i * 3);
    dut.u_rf.regs[1] = 32'h102;   // misaligned data address
    repeat (2) @(posedge clk);
    @(negedge clk);
    for (int i = 0; i < 32; i++) prev_rf[i] = dut.u_rf.regs[i];
    rst = 0;
    trap_cycle = 0; vec_cycle = 0; racer_seen = 0; racer_flag = 0;
    for (c = 1; c <= 12; c++) begin
      #1;
      if (c == 1) check({name, " first fetch"}, pc, MAIN_PC);
      if (trap && trap_cycle == 0) begin
        trap_cycle = c;
        racer_seen = racer_in_ex ? dut.e.pc : dut.d.pc;
        racer_flag = racer_in_ex ? (dut.alu_err_e | dut.e.op_err) : dut.op_err_d;
      end
      if (pc == MTVEC && vec_cycle == 0) vec_cycle = c;
      @(negedge clk);
    end
    check({name, " trap cycle"}, trap_cycle, 5);
    check({name, " mtvec fetched in the next cycle"}, vec_cycle, 6);
    check({name, " mepc"}, dut.u_csr.mepc, 32'h0000_d404);
    check({name, " mcause"}, dut.u_csr.mcause, cause);
    check({name, " younger instruction in flight"}, racer_seen, racer_pc);
    check({name, " its own error flag"}, 32'(racer_flag), 32'(racer_err));
    check({name, " trap routine ran"}, dut.u_rf.regs[31], 1);
    foreach (written[k]) begin
      checks++;
      if (dut.u_rf.regs[written[k]] === prev_rf[written[k]]) begin
        failures++;
        $display("FAIL %s x%0d (older instruction) not written", name, written[k]);
      end
    end
    foreach (untouched[k])
      check($sformatf("%s x%0d not written", name, untouched[k]),
            dut.u_rf.regs[untouched[k]], prev_rf[untouched[k]]);
  endtask

  initial begin
    // 1: simple misaligned load
    run("lw", '{ADDI(9, 0, 77), LW(2, 0, 1), ADD(5, 3, 4), OR_(7, 3, 4)},
        32'd4, 32'h0000_d408, 1'b1, 1'b0, '{9}, '{2, 5, 7});
    // 2: illegal instruction found in ID, handled in MEM
    run("mul", '{ADD(5, 1, 3), MUL(6, 2, 4), OR_(7, 5, 2), AND_(4, 1, 3), SUB(2, 1, 3)},
        32'd2, 32'h0000_d40c, 1'b0, 1'b0, '{5}, '{6, 7, 4, 2});
    // 3: simultaneous: lw in MEM, mul in ID
    run("simultaneous", '{ADDI(9, 0, 77), LW(2, 0, 1), ADD(5, 3, 4), MUL(6, 3, 4), OR_(7, 3, 4)},
        32'd4, 32'h0000_d40c, 1'b0, 1'b1, '{9}, '{2, 5, 6, 7});
    // 4: in order: xor and sra both fail in EX, xor is older
    run("in order", '{ADDI(9, 0, 77), XOR_(5, 1, 2), SRA(6, 1, 2), OR_(7, 3, 4)},
        32'd2, 32'h0000_d408, 1'b1, 1'b1, '{9}, '{5, 6, 7});
    // 5: out of order: mul seen in ID before the older lw fails in MEM
    run("out of order", '{ADDI(9, 0, 77), LW(2, 0, 1), MUL(6, 3, 4), OR_(7, 3, 4)},
        32'd4, 32'h0000_d408, 1'b1, 1'b1, '{9}, '{2, 6, 7});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
