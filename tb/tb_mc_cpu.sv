// tb_mc_cpu: self-checking test of the multicycle processor.
//
// The common test program (code, handler and data in the one memory) runs
// against the reference model instruction by instruction: at every fetch
// state the processor's PC must equal the model's, and the number of cycles
// the previous instruction took must match the state sequence of its class
// (lw 5, sw/ALU/jal 4, beq/mret/csrrw 3; a trap ends in SE after the state
// that found it, an interrupt adds SI). An interrupt device raises the
// request while the main program runs and drops it when a trap is taken,
// until two interrupts have been served. Registers, mepc, mcause, memory
// words and trap counts are compared at the end.
module tb_mc_cpu;
  import rv_tb_pkg::*;
  import rv_pkg::*;

  localparam int WORDS = 1024;
  logic clk = 0, rst = 1, int_i = 0;
  logic [31:0] pc, mem_addr, mem_wdata;
  logic trap, mem_we;
  int checks = 0, failures = 0, cycles = 0, dut_traps = 0, since = 0, n_instr = 0;

  mc_cpu #(.MEM_WORDS(WORDS)) dut (
    .clk, .rst, .int_i, .pc_o(pc), .trap_o(trap), .mem_we, .mem_addr, .mem_wdata);

  always #5 clk = ~clk;

  rv_iss       iss;
  image_t      img;
  logic [31:0] done_pc, in;
  bit          int_last, started;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // cycles of one instruction, from its class and how it ended
  function automatic int exp_cycles(logic [31:0] i, logic [31:0] ipc, int ntrap_before);
    int base, n;
    logic [31:0] c;
    n = iss.trap_cause.size() - ntrap_before;   // traps taken by this step
    case (i[6:0])
      7'b0000011: base = 5;
      7'b0100011, 7'b0110011, 7'b0010011, 7'b1101111: base = 4;
      default:    base = 3;
    endcase
    if (n == 0) return base;
    c = iss.trap_cause[iss.trap_cause.size()-1];
    if (c[31]) return base + 1;                  // completed, then SI
    if (ipc[1:0] != 0) return 2;                 // S0, SE
    if (c == 2 && (i[6:0] == 7'b0110011 || i[6:0] == 7'b0010011) &&
        (i[6:0] != 7'b0110011 || i[31:25] == 0 || i[31:25] == 7'h20)) return 4; // S0,S1,S6/S8,SE
    if (c == 2) return 3;                        // S0,S1,SE
    return 5;                                    // S0,S1,S2,S3/S5,SE
  endfunction

  initial begin : watchdog
    repeat (8000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ipc;
    int ntr;
    put_handler(img, WORDS);
    done_pc = put_main(img, WORDS);
    foreach (img[k]) dut.u_mem.mem[k] = img[k];
    iss = new(WORDS, 1'b1, 1'b1);
    iss.dmem = img;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 1; i < 32; i++) iss.x[i] = dut.u_rf.regs[i];
    started = 0;
    forever begin
      @(negedge clk);
      cycles++;
      since++;
      // interrupt device
      if (trap) int_i = 0;
      else if (iss.n_int < 2 && cycles >= (iss.n_int == 0 ? 20 : 200) &&
               pc >= MAIN_PC && pc < done_pc) int_i = 1;
      #1;
      if (trap) dut_traps++;
      if (dut.u_fsm.state == S0) begin
        if (started) begin
          in  = iss.rd_word(iss.dmem, iss.pc);
          ipc = iss.pc;
          ntr = iss.trap_cause.size();
          iss.step(int_last);
          check($sformatf("cycles of instr at %h", ipc), 32'(since), 32'(exp_cycles(in, ipc, ntr)));
          n_instr++;
        end
        started = 1;
        since = 0;
        int_last = 0;
        check($sformatf("pc at cycle %0d", cycles), pc, iss.pc);
        if (pc == done_pc && iss.pc == done_pc && iss.n_int == 2) break;
      end else if (!trap) begin
        int_last = int_i;
      end
      if (cycles > 6000) break;
    end
    repeat (3) @(posedge clk);
    for (int i = 1; i < 32; i++) check($sformatf("x%0d", i), dut.u_rf.regs[i], iss.x[i]);
    check("mepc", dut.u_csr.mepc, iss.mepc);
    check("mcause", dut.u_csr.mcause, iss.mcause);
    foreach (iss.dmem[k]) check($sformatf("mem word %0d", k), dut.u_mem.mem[k], iss.dmem[k]);
    check("data 0x800", dut.u_mem.mem[widx('h800, WORDS)], 32'd17);
    check("traps taken", 32'(dut_traps), 32'(iss.n_exc + iss.n_int));
    check("exceptions expected", 32'(iss.n_exc), 32'd9);
    check("interrupts expected", 32'(iss.n_int), 32'd2);
    $display("cycles=%0d instructions=%0d traps=%0d", cycles, n_instr, dut_traps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
