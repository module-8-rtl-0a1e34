// rv_tb_pkg: verification helpers for the reduced RISC-V processors.
//
//  * Instruction encoders (enc_*) for the instructions the processors run
//    and for a few they must reject (mul, xor, sll, sra, xori, lui).
//  * std_program(): the common test program. A main program at 0x0000d400
//    exercises every implemented instruction and provokes every exception
//    (illegal opcode, unimplemented ALU operation, misaligned load, store and
//    instruction fetch), with the overlaps of the pipelined examples
//    (a misaligned lw directly followed by mul, xor followed by sra). The
//    trap handler at mtvec 0x1c000000 counts traps in memory word 0x700,
//    stores the last cause (0x704) and mepc (0x708), then resumes: after the
//    faulting instruction for an exception, at the return address in x1 for
//    a misaligned fetch, at mepc for an interrupt. The program ends in a
//    jump-to-self at DONE_PC. Words are placed by word index modulo the
//    memory size, as the processors' memories decode addresses.
//  * rv_iss: an instruction-level reference model written from the ISA
//    rules (not from the RTL), used to predict registers, memory, mepc,
//    mcause and the sequence of traps.
package rv_tb_pkg;

  localparam logic [31:0] MTVEC   = 32'h1c00_0000;
  localparam logic [31:0] MAIN_PC = 32'h0000_d400;

  // ---------------- encoders ----------------
  function automatic logic [31:0] enc_r(int f7, int rs2, int rs1, int f3, int rd, logic [6:0] op);
    return {f7[6:0], rs2[4:0], rs1[4:0], f3[2:0], rd[4:0], op};
  endfunction
  function automatic logic [31:0] enc_i(int imm, int rs1, int f3, int rd, logic [6:0] op);
    return {imm[11:0], rs1[4:0], f3[2:0], rd[4:0], op};
  endfunction
  function automatic logic [31:0] enc_s(int imm, int rs2, int rs1, int f3, logic [6:0] op);
    return {imm[11:5], rs2[4:0], rs1[4:0], f3[2:0], imm[4:0], op};
  endfunction
  function automatic logic [31:0] enc_b(int imm, int rs2, int rs1, int f3);
    return {imm[12], imm[10:5], rs2[4:0], rs1[4:0], f3[2:0], imm[4:1], imm[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] enc_j(int imm, int rd);
    return {imm[20], imm[10:1], imm[11], imm[19:12], rd[4:0], 7'b1101111};
  endfunction

  function automatic logic [31:0] ADD (int rd, int a, int b); return enc_r(0,  b, a, 0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SUB (int rd, int a, int b); return enc_r(32, b, a, 0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] AND_(int rd, int a, int b); return enc_r(0,  b, a, 7, rd, 7'b0110011); endfunction
  function automatic logic [31:0] OR_ (int rd, int a, int b); return enc_r(0,  b, a, 6, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLT (int rd, int a, int b); return enc_r(0,  b, a, 2, rd, 7'b0110011); endfunction
  function automatic logic [31:0] XOR_(int rd, int a, int b); return enc_r(0,  b, a, 4, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SLL (int rd, int a, int b); return enc_r(0,  b, a, 1, rd, 7'b0110011); endfunction
  function automatic logic [31:0] SRA (int rd, int a, int b); return enc_r(32, b, a, 5, rd, 7'b0110011); endfunction
  function automatic logic [31:0] MUL (int rd, int a, int b); return enc_r(1,  b, a, 0, rd, 7'b0110011); endfunction
  function automatic logic [31:0] ADDI(int rd, int a, int i); return enc_i(i, a, 0, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ANDI(int rd, int a, int i); return enc_i(i, a, 7, rd, 7'b0010011); endfunction
  function automatic logic [31:0] ORI (int rd, int a, int i); return enc_i(i, a, 6, rd, 7'b0010011); endfunction
  function automatic logic [31:0] SLTI(int rd, int a, int i); return enc_i(i, a, 2, rd, 7'b0010011); endfunction
  function automatic logic [31:0] XORI(int rd, int a, int i); return enc_i(i, a, 4, rd, 7'b0010011); endfunction
  function automatic logic [31:0] LW  (int rd, int off, int a); return enc_i(off, a, 2, rd, 7'b0000011); endfunction
  function automatic logic [31:0] SW  (int rs, int off, int a); return enc_s(off, rs, a, 2, 7'b0100011); endfunction
  function automatic logic [31:0] BEQ (int a, int b, int off); return enc_b(off, b, a, 0); endfunction
  function automatic logic [31:0] JAL (int rd, int off); return enc_j(off, rd); endfunction
  function automatic logic [31:0] LUI (int rd, int i); return {i[19:0], rd[4:0], 7'b0110111}; endfunction
  function automatic logic [31:0] MRET(); return 32'h3020_0073; endfunction
  function automatic logic [31:0] CSRRW(int rd, int csr, int rs1); return enc_i(csr, rs1, 1, rd, 7'b1110011); endfunction
  localparam int MEPC = 'h341, MCAUSE = 'h342;

  // ---------------- program image ----------------
  typedef logic [31:0] image_t [int];

  function automatic int widx(logic [31:0] addr, int words);
    return int'((addr >> 2) % words);
  endfunction

  // Trap handler at MTVEC.
  function automatic void put_handler(ref image_t img, input int words);
    logic [31:0] h [$];
    h = '{ CSRRW(28, MCAUSE, 0),     // x28 = mcause
           SW(28, 'h704, 0),         // use right after csrrw (stall)
           LW(29, 'h700, 0),
           ADDI(29, 29, 1),          // load-use (stall)
           SW(29, 'h700, 0),
           CSRRW(30, MEPC, 0),       // x30 = mepc
           SW(30, 'h708, 0),
           BEQ(28, 0, 24),           // cause 0 -> return to x1
           SLT(31, 28, 0),           // x31 = 1 for an interrupt
           BEQ(31, 0, 12),           // exception -> skip the instruction
           CSRRW(31, MEPC, 30),      // interrupt: resume at mepc
           MRET(),
           ADDI(30, 30, 4),          // skip: mepc + 4
           CSRRW(31, MEPC, 30),      // csrrw mepc directly before mret
           MRET(),
           CSRRW(31, MEPC, 1),       // cause 0: resume at x1
           MRET() };
    // fix-up: BEQ(28,0,...) at index 7 must reach index 15: offset 8*4 = 32
    h[7] = BEQ(28, 0, 32);
    foreach (h[k]) img[widx(MTVEC + 32'(4*k), words)] = h[k];
  endfunction

  // Main program; returns the address of its final jump-to-self.
  function automatic logic [31:0] put_main(ref image_t img, input int words);
    logic [31:0] p [$];
    p = '{ SW(0, 'h700, 0),          // trap counter = 0
           ADDI(1, 0, 5),
           ADDI(2, 0, 12),
           ADD(3, 1, 2),             // 17
           SUB(4, 2, 1),             // 7
           AND_(5, 1, 2),            // 4
           OR_(6, 1, 2),             // 13
           SLT(7, 1, 2),             // 1
           SLTI(8, 2, 3),            // 0
           ANDI(9, 2, 6),            // 4
           ORI(10, 1, 8),            // 13
           ADDI(14, 0, 'h800),
           SW(3, 0, 14),
           LW(11, 0, 14),
           ADD(12, 11, 1),           // load-use: 22
           LW(15, 1, 14),            // misaligned load (cause 4) ...
           MUL(13, 1, 2),            // ... directly followed by mul (cause 2)
           XOR_(13, 1, 2),           // cause 2 (ALU)
           SRA(13, 1, 2),            // cause 2 (ALU), right after xor
           OR_(25, 1, 2),
           SLL(13, 1, 2),            // cause 2 (ALU)
           XORI(13, 1, 3),           // cause 2 (ALU)
           LUI(13, 1),               // cause 2 (unknown opcode)
           SW(1, 2, 14),             // misaligned store (cause 6): no write
           LW(16, 0, 14),            // still 17
           BEQ(1, 1, 8),             // taken
           ADDI(17, 0, 99),          //   skipped
           BEQ(1, 2, 8),             // not taken
           ADDI(18, 0, 1),
           JAL(19, 8),               // jal, skip one
           ADDI(20, 0, 99),          //   skipped
           JAL(1, 6),                // target misaligned (cause 0)
           ADDI(21, 0, 7),           // handler returns here (x1)
           CSRRW(22, MCAUSE, 0),     // x22 = 0 (last cause)
           CSRRW(23, MEPC, 21),      // x23 = old mepc, mepc = 7
           CSRRW(24, MEPC, 0),       // x24 = 7, mepc = 0
           ADD(26, 24, 1),           // use right after csrrw: 12
           ADDI(27, 0, 3),
           ADD(27, 27, 27),          // forwarding from MEM: 6
           ADD(27, 27, 1),           // 11
           SW(27, 4, 14),
           JAL(0, 0) };              // done: jump to self
    foreach (p[k]) img[widx(MAIN_PC + 32'(4*k), words)] = p[k];
    return MAIN_PC + 32'(4*(p.size()-1));
  endfunction

  // ---------------- reference model ----------------
  class rv_iss;
    int unsigned words;
    bit          unified;        // one memory for code and data
    bit          mc_int_rules;   // mret/csrrw are not interruptible
    image_t      imem, dmem;
    logic [31:0] x [32];
    logic [31:0] pc, mepc, mcause;
    logic [31:0] trap_epc [$], trap_cause [$];
    int          n_exc, n_int;

    function new(int unsigned words_, bit unified_, bit mc_rules_);
      words = words_; unified = unified_; mc_int_rules = mc_rules_;
      pc = MAIN_PC; mepc = 0; mcause = 0; n_exc = 0; n_int = 0;
      foreach (x[i]) x[i] = 0;
    endfunction

    function logic [31:0] rd_word(ref image_t m, input logic [31:0] a);
      int k = widx(a, words);
      return m.exists(k) ? m[k] : 32'h0;
    endfunction

    function void trap(logic [31:0] cause, logic [31:0] epc);
      mepc = epc; mcause = cause; pc = MTVEC;
      trap_epc.push_back(epc); trap_cause.push_back(cause);
      if (cause[31]) n_int++; else n_exc++;
    endfunction

    // Execute one instruction; int_req: interrupt request at its end.
    function void step(bit int_req);
      logic [31:0] in, nxt, a, b, r, imm, addr;
      logic [6:0]  op; logic [2:0] f3; logic [6:0] f7; logic [11:0] csr;
      int rd, rs1, rs2;
      bit ok, wr, noint;
      if (pc[1:0] != 0) begin trap(32'd0, pc); return; end
      in  = unified ? rd_word(dmem, pc) : rd_word(imem, pc);
      op = in[6:0]; f3 = in[14:12]; f7 = in[31:25]; csr = in[31:20];
      rd = 32'(in[11:7]); rs1 = 32'(in[19:15]); rs2 = 32'(in[24:20]);
      a = x[rs1]; b = x[rs2];
      nxt = pc + 4; wr = 0; r = 0; noint = 0;
      case (op)
        7'b0110011, 7'b0010011: begin
          ok = 1;
          b = (op == 7'b0010011) ? {{20{in[31]}}, in[31:20]} : b;
          if (op == 7'b0110011 && !(f7 == 0 || f7 == 7'h20)) begin trap(2, pc); return; end
          case (f3)
            3'd0: r = (op == 7'b0110011 && f7 == 7'h20) ? a - b : a + b;
            3'd2: r = ($signed(a) < $signed(b)) ? 1 : 0;
            3'd6: r = a | b;
            3'd7: r = a & b;
            default: ok = 0;
          endcase
          if (!ok) begin trap(2, pc); return; end
          wr = 1;
        end
        7'b0000011: begin
          addr = a + {{20{in[31]}}, in[31:20]};
          if (addr[1:0] != 0) begin trap(4, pc); return; end
          r = unified ? rd_word(dmem, addr) : rd_word(dmem, addr); wr = 1;
        end
        7'b0100011: begin
          addr = a + {{20{in[31]}}, in[31:25], in[11:7]};
          if (addr[1:0] != 0) begin trap(6, pc); return; end
          dmem[widx(addr, words)] = b;
        end
        7'b1100011: begin
          imm = {{20{in[31]}}, in[7], in[30:25], in[11:8], 1'b0};
          if (a == b) nxt = pc + imm;
        end
        7'b1101111: begin
          imm = {{12{in[31]}}, in[19:12], in[20], in[30:21], 1'b0};
          r = pc + 4; wr = 1; nxt = pc + imm;
        end
        7'b1110011: begin
          noint = mc_int_rules;
          if (f3 == 0 && csr == 12'h302) nxt = mepc;
          else if (f3 == 1 && csr == 12'h342) begin r = mcause; wr = 1; end
          else if (f3 == 1 && csr == 12'h341) begin r = mepc; wr = 1; mepc = a; end
          else begin trap(2, pc); return; end
        end
        default: begin trap(2, pc); return; end
      endcase
      if (wr && rd != 0) x[rd] = r;
      pc = nxt;
      if (int_req && !noint) trap(32'h8000_000b, nxt);
    endfunction
  endclass

endpackage
