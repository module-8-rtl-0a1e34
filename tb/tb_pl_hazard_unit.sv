// tb_pl_hazard_unit: self-checking test of the pipeline hazard unit.
// 20000 random input vectors (register numbers drawn from a small set so
// that matches are frequent) are compared with a reference: a stall is
// needed when the instruction in EX is a load writing the register file, or
// a csrrw, and its destination equals a source of the instruction in ID;
// stall holds PC and IF/ID and flushes ID/EX; a taken branch/jump or an mret
// in EX flushes IF/ID and ID/EX; an exception in MEM flushes IF/ID, ID/EX,
// EX/MEM and MEM/WB and cancels the stall. Each case kind is counted and
// must occur. Combinational; a watchdog ends a hung run.
module tb_pl_hazard_unit;
  import rv_pkg::*;
  logic [4:0] rs1_d, rs2_d, rd_e;
  res_src_e ressrc_e;
  logic br_wr_e, is_csrw_e, pc_src_e, is_mret_e, exc_m;
  logic stall_f, stall_d, flush_d, flush_e, flush_m, flush_w;
  int checks = 0, failures = 0, n_lw = 0, n_csr = 0, n_exc_stall = 0;

  pl_hazard_unit dut (.*);

  initial begin : watchdog
    #1_000_000 failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic st, lw_st, csr_st;
    logic [5:0] exp;
    repeat (20000) begin
      rs1_d = 5'($urandom_range(0, 3)); rs2_d = 5'($urandom_range(0, 3));
      rd_e = 5'($urandom_range(0, 3));
      ressrc_e = res_src_e'($urandom_range(0, 4));
      br_wr_e = 1'($urandom_range(0, 1)); is_csrw_e = $urandom_range(0, 3) == 0;
      pc_src_e = $urandom_range(0, 3) == 0; is_mret_e = $urandom_range(0, 5) == 0;
      exc_m = $urandom_range(0, 5) == 0;
      #1;
      lw_st  = ressrc_e == RES_MEM && br_wr_e && (rs1_d == rd_e || rs2_d == rd_e);
      csr_st = is_csrw_e && (rs1_d == rd_e || rs2_d == rd_e);
      st = lw_st || csr_st;
      n_lw += lw_st; n_csr += csr_st; n_exc_stall += st && exc_m;
      exp = {st && !exc_m, st && !exc_m, pc_src_e || is_mret_e || exc_m,
             st || pc_src_e || is_mret_e || exc_m, exc_m, exc_m};
      checks++;
      if ({stall_f, stall_d, flush_d, flush_e, flush_m, flush_w} !== exp) begin
        failures++;
        $display("FAIL rs1=%0d rs2=%0d rd=%0d ressrc=%0d brwr=%b csrw=%b pcsrc=%b mret=%b exc=%b: got %b expected %b",
                 rs1_d, rs2_d, rd_e, ressrc_e, br_wr_e, is_csrw_e, pc_src_e, is_mret_e, exc_m,
                 {stall_f, stall_d, flush_d, flush_e, flush_m, flush_w}, exp);
      end
    end
    checks += 3;
    if (n_lw == 0 || n_csr == 0 || n_exc_stall == 0) begin
      failures++; $display("FAIL a case kind never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
