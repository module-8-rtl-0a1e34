// tb_instr_mem: self-checking test of the instruction memory (default 1024
// words). The array is filled with random words; 4000 random addresses are
// read and compared with the word selected by address bits 11:2, and the
// error flag must be set exactly when address bits 1:0 are not zero.
// Combinational; a watchdog ends a hung run.
module tb_instr_mem;
  localparam int WORDS = 1024;
  logic [31:0] a, rd;
  logic e;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  instr_mem dut (.*);

  initial begin : watchdog
    #1_000_000 failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) begin
      model[i] = $urandom; dut.mem[i] = model[i];
    end
    repeat (4000) begin
      a = $urandom;
      if ($urandom_range(0, 1) != 0) a[1:0] = 0;
      #1;
      checks++;
      if (rd !== model[a[11:2]] || e !== |a[1:0]) begin
        failures++;
        $display("FAIL a=%h: rd=%h e=%b expected %h", a, rd, e, model[a[11:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
