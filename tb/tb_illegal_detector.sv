// tb_illegal_detector: self-checking test of the illegal-instruction
// detector. Every 7-bit opcode is tried with every funct3 and with a set of
// csr fields (0x000, 0x020, 0x302, 0x341, 0x342, 0x305, 0x001, 0x400 and
// random values). The reference: loads, stores, OP-IMM, branches and jal are
// legal; R-type is legal only with funct7 0000000 or 0100000; in the system
// opcode only mret (funct3 000, csr 0x302) and csrrw (funct3 001) on mepc or
// mcause are legal; all other opcodes are illegal. Combinational.
module tb_illegal_detector;
  import rv_pkg::*;
  logic [6:0] op;
  logic [2:0] funct3;
  logic [11:0] csr;
  logic e;
  int checks = 0, failures = 0;

  illegal_detector dut (.*);

  initial begin : watchdog
    #10_000_000 failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_e(logic [6:0] o, logic [2:0] f3, logic [11:0] c);
    case (o)
      7'b0000011, 7'b0100011, 7'b0010011, 7'b1100011, 7'b1101111: return 1'b0;
      7'b0110011: return !(c[11:5] == 7'h00 || c[11:5] == 7'h20);
      7'b1110011: return !((f3 == 3'b000 && c == 12'h302) ||
                           (f3 == 3'b001 && (c == 12'h341 || c == 12'h342)));
      default:    return 1'b1;
    endcase
  endfunction

  initial begin
    automatic logic [11:0] csrs [12] = '{12'h000, 12'h020, 12'h302, 12'h341, 12'h342,
                               12'h305, 12'h001, 12'h400, 12'h300, 12'h040,
                               12'h343, 12'h102};
    for (int o = 0; o < 128; o++)
      for (int f = 0; f < 8; f++) begin
        for (int k = 0; k < 16; k++) begin
          op = 7'(o); funct3 = 3'(f);
          csr = (k < 12) ? csrs[k] : 12'($urandom);
          #1;
          checks++;
          if (e !== ref_e(op, funct3, csr)) begin
            failures++;
            $display("FAIL op=%b f3=%b csr=%h: e=%b", op, funct3, csr, e);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
