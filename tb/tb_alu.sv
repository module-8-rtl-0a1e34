// tb_alu: self-checking test of the ALU.
// Applies directed corner cases and 2000 random operand pairs for each of
// the eight 3-bit operation codes and compares result, zero flag and error
// flag with a reference written here: add, sub, and, or, signed slt; codes
// 100, 110 and 111 must raise the error flag. Combinational; each vector is
// checked 1 time unit after it is applied. A watchdog ends a hung run.
module tb_alu;
  import rv_pkg::*;
  logic [31:0] a, b, r;
  alu_op_e op;
  logic z, e;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin : watchdog
    #10_000_000 failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [31:0] ta, logic [31:0] tb_, logic [2:0] top);
    logic [31:0] exp_r;
    logic exp_e;
    a = ta; b = tb_; op = alu_op_e'(top);
    #1;
    exp_e = 1'b0; exp_r = 'x;
    unique case (top)
      3'b000: exp_r = ta + tb_;
      3'b001: exp_r = ta - tb_;
      3'b010: exp_r = ta & tb_;
      3'b011: exp_r = ta | tb_;
      3'b101: exp_r = {31'b0, $signed(ta) < $signed(tb_)};
      default: exp_e = 1'b1;
    endcase
    checks++;
    if (e !== exp_e || (!exp_e && (r !== exp_r || z !== (exp_r == 0)))) begin
      failures++;
      $display("FAIL a=%h b=%h op=%b: r=%h z=%b e=%b expected r=%h e=%b",
               ta, tb_, top, r, z, e, exp_r, exp_e);
    end
  endtask

  initial begin
    automatic logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h7fff_ffff,
                                32'h8000_0000, 32'h1234_5678};
    for (int o = 0; o < 8; o++) begin
      foreach (corner[i]) foreach (corner[j]) apply(corner[i], corner[j], 3'(o));
      repeat (2000) apply($urandom, $urandom, 3'(o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
