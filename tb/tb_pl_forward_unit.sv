// tb_pl_forward_unit: self-checking test of the forwarding unit. All
// combinations of source and destination registers from {x0, x1, x2} and of
// the two write enables are applied; the reference selects 10 (from MEM)
// when MEM writes the same non-zero register, else 01 (from WB) when WB
// does, else 00. Combinational; a watchdog ends a hung run.
module tb_pl_forward_unit;
  logic [4:0] rs1_e, rs2_e, rd_m, rd_w;
  logic br_wr_m, br_wr_w;
  logic [1:0] fwd_a, fwd_b;
  int checks = 0, failures = 0;

  pl_forward_unit dut (.*);

  initial begin : watchdog
    #1_000_000 failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] ref_sel(logic [4:0] rs);
    if (rs != 0 && br_wr_m && rs == rd_m) return 2'b10;
    if (rs != 0 && br_wr_w && rs == rd_w) return 2'b01;
    return 2'b00;
  endfunction

  initial begin
    for (int v = 0; v < 81 * 4; v++) begin
      rs1_e = 5'(v % 3); rs2_e = 5'((v / 3) % 3); rd_m = 5'((v / 9) % 3);
      rd_w = 5'((v / 27) % 3); {br_wr_m, br_wr_w} = 2'(v / 81);
      #1;
      checks++;
      if (fwd_a !== ref_sel(rs1_e) || fwd_b !== ref_sel(rs2_e)) begin
        failures++;
        $display("FAIL rs1=%0d rs2=%0d rdm=%0d rdw=%0d wm=%b ww=%b: a=%b b=%b",
                 rs1_e, rs2_e, rd_m, rd_w, br_wr_m, br_wr_w, fwd_a, fwd_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
