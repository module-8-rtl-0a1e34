// tb_sc_cpu: self-checking test of the single-cycle processor.
//
// Loads the common test program (rv_tb_pkg::std_program parts) into the
// instruction memory and runs it in lockstep with the reference model: every
// cycle the processor's PC must equal the model's, since each instruction
// (or trap) takes exactly one cycle. Two interrupt requests are raised, each
// for one cycle, while the main program runs; the model takes them after the
// current instruction. At the end the registers, mepc, mcause, the handler's
// bookkeeping words in data memory and the number of traps are compared.
module tb_sc_cpu;
  import rv_tb_pkg::*;

  localparam int WORDS = 1024;
  logic clk = 0, rst = 1, int_i = 0;
  logic [31:0] pc, mem_addr, mem_wdata;
  logic trap, mem_we;
  int checks = 0, failures = 0, cycles = 0, dut_traps = 0, ints = 0;

  sc_cpu #(.IMEM_WORDS(WORDS), .DMEM_WORDS(WORDS)) dut (
    .clk, .rst, .int_i, .pc_o(pc), .trap_o(trap), .mem_we, .mem_addr, .mem_wdata);

  always #5 clk = ~clk;

  rv_iss       iss;
  image_t      img;
  logic [31:0] done_pc;

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
    // lockstep
    while (!(pc == done_pc && iss.pc == done_pc)) begin
      @(negedge clk);
      cycles++;
      // device: two one-cycle requests inside the main program
      int_i = (ints == 0 && cycles >= 6 && pc >= MAIN_PC && pc < done_pc)
           || (ints == 1 && cycles >= 25 && pc >= MAIN_PC && pc < done_pc);
      if (int_i) ints++;
      #1;
      check($sformatf("pc at cycle %0d", cycles), pc, iss.pc);
      if (trap) dut_traps++;
      iss.step(int_i);
      @(posedge clk);
      #1 int_i = 0;
      if (cycles > 3000) break;
    end
    repeat (3) @(posedge clk);
    for (int i = 1; i < 32; i++) check($sformatf("x%0d", i), dut.u_rf.regs[i], iss.x[i]);
    check("mepc", dut.u_csr.mepc, iss.mepc);
    check("mcause", dut.u_csr.mcause, iss.mcause);
    check("trap count word", dut.u_dmem.mem[widx('h700, WORDS)], iss.dmem[widx('h700, WORDS)]);
    check("last cause word", dut.u_dmem.mem[widx('h704, WORDS)], iss.dmem[widx('h704, WORDS)]);
    check("last mepc word", dut.u_dmem.mem[widx('h708, WORDS)], iss.dmem[widx('h708, WORDS)]);
    check("data 0x800", dut.u_dmem.mem[widx('h800, WORDS)], 32'd17);
    check("data 0x804", dut.u_dmem.mem[widx('h804, WORDS)], iss.dmem[widx('h804, WORDS)]);
    check("traps taken", 32'(dut_traps), 32'(iss.n_exc + iss.n_int));
    check("exceptions expected", 32'(iss.n_exc), 32'd9);
    check("interrupts expected", 32'(iss.n_int), 32'd2);
    check("x12 (load-use)", dut.u_rf.regs[12], 32'd22);
    $display("cycles=%0d traps=%0d", cycles, dut_traps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
