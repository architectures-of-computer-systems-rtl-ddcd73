// tb_hmu: self-checking test of the hazard management unit, in both branch
// configurations. Random register numbers from a small range (so that matches
// are frequent) and random control inputs; the expected outputs are derived
// here from the hazard rules: forward from MEM before WB, never for x0; a
// load-use hazard stalls IF and ID/OF and inserts a bubble in EX; a taken
// transfer flushes ID/OF and EX (and MEM when resolved in MEM) and cancels
// the stall.
module tb_hmu;
  import picorv_pkg::*;

  reg_addr_t rs1_d, rs2_d, rs1_e, rs2_e, rd_e, rd_m, rd_w;
  logic use_rs1_d, use_rs2_d, mem_to_reg_e, reg_write_m, reg_write_w, branch_outcome;
  int checks = 0, failures = 0, n_stall = 0, n_fm = 0, n_fw = 0, n_br = 0;

  fwd_sel_e fa0, fb0, fa1, fb1;
  logic sf0, sd0, fd0, fe0, fm0, lw0, sf1, sd1, fd1, fe1, fm1, lw1;

  hmu #(.BRANCH_IN_MEM(1'b0)) dut_ex (
    .rs1_d, .rs2_d, .use_rs1_d, .use_rs2_d, .rs1_e, .rs2_e, .rd_e, .mem_to_reg_e,
    .rd_m, .reg_write_m, .rd_w, .reg_write_w, .branch_outcome,
    .forward_a_e(fa0), .forward_b_e(fb0), .stall_f(sf0), .stall_d(sd0),
    .flush_d(fd0), .flush_e(fe0), .flush_m(fm0), .lw_stall(lw0));

  hmu dut_mem (
    .rs1_d, .rs2_d, .use_rs1_d, .use_rs2_d, .rs1_e, .rs2_e, .rd_e, .mem_to_reg_e,
    .rd_m, .reg_write_m, .rd_w, .reg_write_w, .branch_outcome,
    .forward_a_e(fa1), .forward_b_e(fb1), .stall_f(sf1), .stall_d(sd1),
    .flush_d(fd1), .flush_e(fe1), .flush_m(fm1), .lw_stall(lw1));

  function automatic logic [1:0] exp_fwd(reg_addr_t rs);
    if (rs != 0 && reg_write_m && rd_m == rs) return 2'b10;
    if (rs != 0 && reg_write_w && rd_w == rs) return 2'b01;
    return 2'b00;
  endfunction

  task automatic chk(logic [11:0] got, logic [11:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL got %b expected %b", got, exp);
    end
  endtask

  initial begin
    repeat (20000) begin
      logic hz;
      rs1_d = 5'($urandom_range(0, 3)); rs2_d = 5'($urandom_range(0, 3));
      rs1_e = 5'($urandom_range(0, 3)); rs2_e = 5'($urandom_range(0, 3));
      rd_e  = 5'($urandom_range(0, 3)); rd_m  = 5'($urandom_range(0, 3));
      rd_w  = 5'($urandom_range(0, 3));
      {use_rs1_d, use_rs2_d, mem_to_reg_e, reg_write_m, reg_write_w} = 5'($urandom);
      branch_outcome = ($urandom_range(0, 4) == 0);
      #1;
      hz = mem_to_reg_e && rd_e != 0 &&
           ((use_rs1_d && rs1_d == rd_e) || (use_rs2_d && rs2_d == rd_e));
      if (hz && !branch_outcome) n_stall++;
      if (exp_fwd(rs1_e) == 2'b10) n_fm++;
      if (exp_fwd(rs1_e) == 2'b01) n_fw++;
      if (branch_outcome) n_br++;
      // {fa, fb, sf, sd, fd, fe, fm, lw, 2'b0}
      chk({fa0, fb0, sf0, sd0, fd0, fe0, fm0, lw0, 2'b00},
          {exp_fwd(rs1_e), exp_fwd(rs2_e), hz && !branch_outcome, hz && !branch_outcome,
           branch_outcome, hz || branch_outcome, 1'b0, hz, 2'b00});
      chk({fa1, fb1, sf1, sd1, fd1, fe1, fm1, lw1, 2'b00},
          {exp_fwd(rs1_e), exp_fwd(rs2_e), hz && !branch_outcome, hz && !branch_outcome,
           branch_outcome, hz || branch_outcome, branch_outcome, hz, 2'b00});
    end
    checks++;
    if (n_stall == 0 || n_fm == 0 || n_fw == 0 || n_br == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
