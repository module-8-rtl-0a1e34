// tb_data_mem: self-checking test of the data memory (default 1024 words).
// 4000 random cycles of reads and writes at random addresses, a quarter of
// them misaligned, are compared with a model: the error flag must equal
// "address bits 1:0 not zero", a misaligned write must leave the memory
// unchanged, and reads are combinational from the word address bits.
// A watchdog ends a hung run.
module tb_data_mem;
  localparam int WORDS = 1024;
  logic clk = 0, we, e;
  logic [31:0] a, wd, rd;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0, blocked = 0;

  data_mem dut (.*);

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
    we = 0; a = 0; wd = 0;
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom; dut.mem[i] = model[i];
    end
    repeat (4000) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 1)); wd = $urandom;
      a = {$urandom} & 32'hffff_fffc;
      if ($urandom_range(0, 3) == 0) a[1:0] = 2'($urandom_range(1, 3));
      #1;
      check("error flag", 32'(e), 32'(|a[1:0]));
      check("read", rd, model[a[11:2]]);
      @(posedge clk) #1;
      if (we && !(|a[1:0])) model[a[11:2]] = wd;
      if (we && (|a[1:0])) blocked++;
      check("after write", dut.mem[a[11:2]], model[a[11:2]]);
    end
    check("misaligned writes tried", 32'(blocked > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
