// tb_mc_main_fsm: self-checking test of the multicycle main FSM.
// A reference model (next-state and output tables written here) is run
// alongside the FSM for 20000 clock cycles with random opcodes (mostly the
// supported ones), random funct3/csr fields and random error and interrupt
// inputs. After every rising edge the state must match the model, and in
// every state all control outputs must match the expected row. Every state
// must be visited, SE and SI included. A watchdog ends a hung run.
module tb_mc_main_fsm;
  import rv_pkg::*;
  logic clk = 0, rst = 1;
  logic [6:0] op;
  logic [2:0] funct3;
  logic [11:0] csr;
  logic m_err, op_err, alu_err, int_i;
  mc_state_e state;
  logic branch, pc_update, addr_src, mem_wr, ir_wr, br_wr, cause_wr, epc_wr;
  logic [1:0] alu_src_a, alu_src_b;
  aluop_e alu_op;
  logic [2:0] res_src;
  int checks = 0, failures = 0;
  int visits [16];
  mc_state_e m;

  mc_main_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    #10_000_000 failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic mc_state_e ref_next(mc_state_e s);
    case (s)
      S0: return m_err ? SE : S1;
      S1: begin
        if (op_err) return SE;
        case (op)
          OP_LOAD, OP_STORE: return S2;
          OP_IMM:    return S8;
          OP_REG:    return S6;
          OP_JAL:    return S9;
          OP_BRANCH: return S10;
          OP_SYSTEM:
            if (funct3 == 3'b000 && csr == 12'h302) return S11;
            else if (funct3 == 3'b001 && csr == 12'h342) return S12;
            else if (funct3 == 3'b001 && csr == 12'h341) return S13;
            else return SE;
          default: return SE;
        endcase
      end
      S2: return op == OP_STORE ? S5 : S3;
      S3: return m_err ? SE : S4;
      S4, S7, S10: return int_i ? SI : S0;
      S5: return m_err ? SE : (int_i ? SI : S0);
      S6, S8: return alu_err ? SE : S7;
      S9: return S7;
      default: return S0;
    endcase
  endfunction

  // {branch, pc_update, addr_src, mem_wr, ir_wr, br_wr, alu_src_a, alu_src_b,
  //  alu_op, res_src, cause_wr, epc_wr}
  function automatic logic [16:0] ref_out(mc_state_e s);
    case (s)
      S0:  return {6'b010010, 2'b00, 2'b10, 2'b00, 3'b010, 2'b00};
      S1:  return {6'b000000, 2'b01, 2'b01, 2'b00, 3'b000, 2'b00};
      S2:  return {6'b000000, 2'b10, 2'b01, 2'b00, 3'b000, 2'b00};
      S3:  return {6'b001000, 2'b00, 2'b00, 2'b00, 3'b000, 2'b00};
      S4:  return {6'b000001, 2'b00, 2'b00, 2'b00, 3'b001, 2'b00};
      S5:  return {6'b001100, 2'b00, 2'b00, 2'b00, 3'b000, 2'b00};
      S6:  return {6'b000000, 2'b10, 2'b00, 2'b10, 3'b000, 2'b00};
      S7:  return {6'b000001, 2'b00, 2'b00, 2'b00, 3'b000, 2'b00};
      S8:  return {6'b000000, 2'b10, 2'b01, 2'b10, 3'b000, 2'b00};
      S9:  return {6'b010000, 2'b01, 2'b10, 2'b00, 3'b000, 2'b00};
      S10: return {6'b100000, 2'b10, 2'b00, 2'b01, 3'b000, 2'b00};
      S11: return {6'b010000, 2'b00, 2'b00, 2'b00, 3'b100, 2'b00};
      S12: return {6'b000001, 2'b00, 2'b00, 2'b00, 3'b101, 2'b00};
      S13: return {6'b000001, 2'b10, 2'b00, 2'b00, 3'b100, 2'b01};
      SE:  return {6'b010000, 2'b01, 2'b00, 2'b00, 3'b011, 2'b11};
      default: return {6'b010000, 2'b00, 2'b00, 2'b00, 3'b011, 2'b11};  // SI
    endcase
  endfunction

  initial begin
    automatic logic [6:0] ops [10] = '{OP_LOAD, OP_STORE, OP_IMM, OP_REG, OP_BRANCH,
                             OP_JAL, OP_SYSTEM, OP_SYSTEM, OP_SYSTEM, 7'b0110111};
    automatic logic [11:0] csrs [4] = '{12'h302, 12'h341, 12'h342, 12'h000};
    op = OP_IMM; funct3 = 0; csr = 0; m_err = 0; op_err = 0; alu_err = 0; int_i = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    m = S0;
    checks++;
    if (state !== S0) begin failures++; $display("FAIL reset state %s", state.name()); end
    repeat (20000) begin
      @(negedge clk);
      // inputs for this cycle
      if (state == S0) begin
        op = ops[$urandom_range(0, 9)];
        funct3 = $urandom_range(0, 3) == 0 ? 3'($urandom) : {2'b00, ($urandom_range(0, 1) == 1)};
        csr = csrs[$urandom_range(0, 3)];
      end
      m_err = $urandom_range(0, 9) == 0; op_err = $urandom_range(0, 9) == 0;
      alu_err = $urandom_range(0, 9) == 0; int_i = $urandom_range(0, 4) == 0;
      #1;
      visits[state]++;
      checks++;
      if ({branch, pc_update, addr_src, mem_wr, ir_wr, br_wr, alu_src_a, alu_src_b,
           alu_op, res_src, cause_wr, epc_wr} !== ref_out(state)) begin
        failures++;
        $display("FAIL outputs in %s", state.name());
      end
      m = ref_next(state);
      @(posedge clk) #1;
      checks++;
      if (state !== m) begin
        failures++;
        $display("FAIL next state %s expected %s", state.name(), m.name());
      end
    end
    for (int s = 0; s < 16; s++) begin
      checks++;
      if (visits[s] == 0) begin failures++; $display("FAIL state %0d never visited", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
