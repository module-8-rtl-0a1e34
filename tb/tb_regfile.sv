// tb_regfile: self-checking test of the register file. Two copies are
// driven with the same 3000 random cycles of writes and reads: one writing
// on the rising edge (single-cycle and multicycle processors) and one on the
// falling edge (pipeline). Both are compared with a model array. The
// falling-edge copy must show a value written in the same cycle before the
// next rising edge; the rising-edge copy only after it. x0 must always read
// 0. A watchdog ends a hung run.
module tb_regfile;
  logic clk = 0, we;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] wd, p_rd1, p_rd2, n_rd1, n_rd2;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile #(.NEGEDGE_WRITE(1'b0)) u_pos (.clk, .we, .ra1, .ra2, .wa, .wd, .rd1(p_rd1), .rd2(p_rd2));
  regfile #(.NEGEDGE_WRITE(1'b1)) u_neg (.clk, .we, .ra1, .ra2, .wa, .wd, .rd1(n_rd1), .rd2(n_rd2));

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
    // fill every register so the model is defined
    we = 1;
    for (int i = 0; i < 32; i++) begin
      @(posedge clk) #1 wa = 5'(i); wd = $urandom;
      model[i] = (i == 0) ? 0 : wd;
    end
    @(posedge clk) #1 we = 0;
    repeat (3000) begin
      @(posedge clk) #1;
      we = 1'($urandom_range(0, 1)); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = $urandom_range(0, 3) == 0 ? wa : 5'($urandom);
      #1;  // first half of the cycle: no write yet in either copy
      check("pos rd1", p_rd1, ra1 == 0 ? 0 : model[ra1]);
      check("pos rd2", p_rd2, ra2 == 0 ? 0 : model[ra2]);
      @(negedge clk) #1;
      // the rising-edge copy still holds the old value
      check("pos rd2 second half", p_rd2, ra2 == 0 ? 0 : model[ra2]);
      if (we && wa != 0) model[wa] = wd;
      // second half: the falling-edge copy already holds the new value
      check("neg rd1", n_rd1, ra1 == 0 ? 0 : model[ra1]);
      check("neg rd2", n_rd2, ra2 == 0 ? 0 : model[ra2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
