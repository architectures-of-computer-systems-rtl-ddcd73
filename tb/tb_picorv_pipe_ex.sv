// tb_picorv_pipe_ex: end-to-end test of the pipelined core configured to
// resolve beq/jal/jalr in EX (BRANCH_IN_MEM = 0, 2-bubble penalty, no FlushM).
//
// Same method and programs as tb_picorv_pipe: programs are loaded through the
// instruction memory load port, the instruction-level reference model gives
// the expected register writes, final state and the exact retire cycle of the
// end marker:
//   fetch(i+1) = fetch(i) + 1 + stall(i) + PEN * taken(i),
//   retire(i)  = fetch(i) + 4 + stall(i),
// here with PEN = 2. Every mechanism of this configuration must occur.
module tb_picorv_pipe_ex;
  import tb_rv_pkg::*;
  import picorv_pkg::FWD_M, picorv_pkg::FWD_W;

  localparam int IW = 1024, DW = 1024;  // memory sizes of the core's defaults
  localparam int PEN = 2;               // bubbles per taken beq/jal/jalr
  localparam int NRAND = 40;            // random programs
  localparam int RLEN = 300;            // instructions per random program

  logic        clk = 1'b0, rst_n = 1'b0, imem_we = 1'b0;
  logic [31:0] imem_addr = '0, imem_wdata = '0;
  logic [31:0] pc_f, res_w;
  logic        reg_write_w;
  logic [4:0]  rd_w;

  picorv_pipe #(.BRANCH_IN_MEM(1'b0)) dut (
    .clk, .rst_n, .imem_we, .imem_addr, .imem_wdata,
    .pc_f, .reg_write_w, .rd_w, .res_w
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters
  int n_fwd_m = 0, n_fwd_w = 0, n_stall = 0, n_flush_m = 0;
  int n_gpr_bypass = 0, n_beq_taken = 0, n_beq_not = 0, n_jal = 0, n_jalr = 0;
  int n_lw = 0, n_sw = 0;

  // monitor
  int    exp_rd[$];
  word_t exp_val[$];
  bit    running = 0;
  int    cyc = 0, marker_cycle = -1, redirects = 0;
  word_t halt_addr;

  always @(negedge clk) begin
    if (running) begin
      if (dut.id_ex_q.ctrl.use_rs1 && dut.forward_a_e == FWD_M) n_fwd_m++;
      if (dut.id_ex_q.ctrl.use_rs2 && dut.forward_b_e == FWD_M) n_fwd_m++;
      if (dut.id_ex_q.ctrl.use_rs1 && dut.forward_a_e == FWD_W) n_fwd_w++;
      if (dut.id_ex_q.ctrl.use_rs2 && dut.forward_b_e == FWD_W) n_fwd_w++;
      if (dut.stall_d) n_stall++;
      if (dut.flush_m) n_flush_m++;
      if (reg_write_w && rd_w != 0 &&
          ((dut.ctrl_d.use_rs1 && dut.rs1_d == rd_w) || (dut.ctrl_d.use_rs2 && dut.rs2_d == rd_w)))
        n_gpr_bypass++;
      if (dut.pc_src && dut.pc_target != halt_addr) redirects++;
      if (reg_write_w && rd_w != 0) begin
        if (rd_w == 5'd31 && marker_cycle < 0) marker_cycle = cyc;
        if (exp_rd.size() == 0) begin
          check(0, $sformatf("unexpected write x%0d=%h at cycle %0d", rd_w, res_w, cyc));
        end else begin
          int    r;
          word_t v;
          r = exp_rd.pop_front();
          v = exp_val.pop_front();
          check(rd_w == 5'(r) && res_w == v,
                $sformatf("cycle %0d write x%0d=%h, expected x%0d=%h", cyc, rd_w, res_w, r, v));
        end
      end
      cyc++;
    end
  end

  task automatic run_prog(input word_t prog[$], input string name, input int max_cycles,
                          input int exp_total = -1);
    rv_model m = new(IW, DW);
    int f = 0, w_marker = -1, n_taken = 0, n_lu = 0, steps = 0;
    bit prev_load = 0;
    int prev_rd = 0;

    running = 0;
    rst_n = 1'b0;
    foreach (prog[i]) begin
      m.imem[i] = prog[i];
      @(negedge clk);
      imem_we = 1'b1; imem_addr = 32'(4 * i); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 1'b0;
    for (int i = 0; i < DW; i++) m.dmem[i] = dut.u_dmem.mem[i];
    halt_addr = 32'(4 * (prog.size() - 1));

    // reference run up to and including the end marker
    exp_rd.delete(); exp_val.delete();
    while (steps < 100000) begin
      word_t pc = m.pc;
      int stall;
      m.step();
      steps++;
      stall = (prev_load && prev_rd != 0 &&
               ((m.use1 && m.rs1_f == prev_rd) || (m.use2 && m.rs2_f == prev_rd))) ? 1 : 0;
      n_lu += stall;
      if (m.wrote) begin exp_rd.push_back(m.wrd); exp_val.push_back(m.wval); end
      if (m.taken) n_taken++;
      if (prog[pc >> 2][6:0] == 7'b1100011) begin
        if (m.taken) n_beq_taken++; else n_beq_not++;
      end
      if (prog[pc >> 2][6:0] == 7'b1101111) n_jal++;
      if (prog[pc >> 2][6:0] == 7'b1100111) n_jalr++;
      if (prog[pc >> 2][6:0] == 7'b0000011) n_lw++;
      if (prog[pc >> 2][6:0] == 7'b0100011) n_sw++;
      if (pc == halt_addr - 4) begin
        w_marker = f + 4 + stall;
        break;
      end
      f = f + 1 + stall + PEN * (m.taken ? 1 : 0);
      prev_load = m.is_load;
      prev_rd = m.rd_f;
    end

    // run the core
    marker_cycle = -1;
    redirects = 0;
    cyc = 0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    running = 1;
    while (marker_cycle < 0 && cyc < max_cycles) @(posedge clk);
    repeat (8) @(posedge clk);
    running = 0;

    check(marker_cycle == w_marker,
          $sformatf("%s: end marker retired in cycle %0d, expected %0d", name, marker_cycle, w_marker));
    if (exp_total >= 0)
      check(marker_cycle + 1 == exp_total,
            $sformatf("%s: took %0d cycles, expected %0d", name, marker_cycle + 1, exp_total));
    check(exp_rd.size() == 0, $sformatf("%s: %0d register writes missing", name, exp_rd.size()));
    check(redirects == n_taken,
          $sformatf("%s: %0d PC redirects, expected %0d", name, redirects, n_taken));
    for (int i = 1; i < 32; i++)
      check(dut.u_gpr.regs[i] == m.regs[i],
            $sformatf("%s: x%0d=%h expected %h", name, i, dut.u_gpr.regs[i], m.regs[i]));
    for (int i = 0; i < DW; i++)
      if (dut.u_dmem.mem[i] != m.dmem[i])
        check(0, $sformatf("%s: dmem[%0d]=%h expected %h", name, i, dut.u_dmem.mem[i], m.dmem[i]));
    checks++;
    $display("%s: %0d instructions, %0d cycles, %0d load-use stalls, %0d taken transfers",
             name, steps, marker_cycle + 1, n_lu, n_taken);
  endtask

  initial begin
    word_t prog[$];

    // 1. hazard-free straight line: n instructions need k + n - 1 cycles (k = 5)
    prog.delete();
    for (int i = 0; i < 19; i++) prog.push_back(a_addi(1 + i % 7, 0, i));
    prog.push_back(a_addi(31, 0, 1));
    prog.push_back(a_jal(0, 0));
    run_prog(prog, "straight", 200, 5 + 20 - 1);

    // 2. the example program with forwarding, a load-use stall and a taken beq
    prog.delete();
    prog.push_back(a_addi(3, 0, 5));
    prog.push_back(a_addi(6, 0, 11));
    prog.push_back(a_addi(7, 0, 22));
    prog.push_back(a_addi(1, 0, 99));
    prog.push_back(a_sw(1, 8, 0));
    prog.push_back(a_add(8, 6, 7));      // x8 = 33
    prog.push_back(a_sub(9, 8, 3));      // forwarded from MEM: x9 = 28
    prog.push_back(a_lw(4, 8, 0));       // x4 = 99
    prog.push_back(a_and(5, 8, 4));      // load-use stall, then forwarded from WB
    prog.push_back(a_or(2, 6, 7));
    prog.push_back(a_beq(6, 6, 12));     // taken to L
    prog.push_back(a_addi(8, 5, 7));     // skipped
    prog.push_back(a_sw(8, 8, 0));       // skipped
    prog.push_back(a_addi(31, 0, 1));    // L: end marker
    prog.push_back(a_jal(0, 0));
    run_prog(prog, "example", 200);
    check(dut.u_gpr.regs[5] == (32'd33 & 32'd99), "example: x5 = x8 & x4");
    check(dut.u_gpr.regs[9] == 32'd28, "example: x9 = x8 - x3");
    check(dut.u_dmem.mem[2] == 32'd99, "example: skipped sw did not write");

    // 3. the five-instruction walk-through program (x2 = 8 and x3 = 12 are set first)
    prog.delete();
    prog.push_back(a_addi(2, 0, 8));
    prog.push_back(a_addi(3, 0, 12));
    prog.push_back(a_addi(5, 0, 40));
    prog.push_back(a_addi(6, 0, 7));
    prog.push_back(a_addi(8, 0, 3));
    prog.push_back(a_addi(9, 0, 12));
    prog.push_back(a_add(1, 2, 3));      // x1 = 20
    prog.push_back(a_sub(4, 5, 6));      // x4 = 33
    prog.push_back(a_or(7, 8, 9));       // x7 = 15
    prog.push_back(a_slt(3, 0, 1));      // x3 = (0 < 20) = 1
    prog.push_back(a_lw(2, 8, 0));
    prog.push_back(a_addi(31, 0, 1));
    prog.push_back(a_jal(0, 0));
    run_prog(prog, "walkthrough", 200);
    check(dut.u_gpr.regs[1] == 32'd20 && dut.u_gpr.regs[3] == 32'd1, "walkthrough: x1, x3");

    // 4. jal x1,40 skips the next instructions and links x1; jalr returns
    prog.delete();
    prog.push_back(a_jal(1, 40));        // 0: to 40
    prog.push_back(a_and(5, 8, 9));      // 4: flushed
    prog.push_back(a_or(6, 4, 8));       // 8: flushed
    for (int i = 3; i < 10; i++) prog.push_back(a_addi(10, 10, 1));
    prog.push_back(a_add(2, 3, 4));      // 40
    prog.push_back(a_jalr(11, 1, 60));   // 44: to 4 + 60 = 64, x11 = 48
    for (int i = 12; i < 16; i++) prog.push_back(a_addi(12, 12, 1));
    prog.push_back(a_addi(31, 0, 1));    // 64
    prog.push_back(a_jal(0, 0));
    run_prog(prog, "jal_jalr", 200);
    check(dut.u_gpr.regs[1] == 32'd4 && dut.u_gpr.regs[11] == 32'd48 &&
          dut.u_gpr.regs[10] == 32'd0 && dut.u_gpr.regs[12] == 32'd0, "jal_jalr: links and skips");

    // 5. random programs
    for (int p = 0; p < NRAND; p++) begin
      gen_program(prog, RLEN);
      run_prog(prog, $sformatf("random%0d", p), 20 * RLEN);
    end

    $display("mechanisms: fwd_mem=%0d fwd_wb=%0d load_use_stall=%0d flushM=%0d gpr_bypass=%0d",
             n_fwd_m, n_fwd_w, n_stall, n_flush_m, n_gpr_bypass);
    $display("            beq_taken=%0d beq_not_taken=%0d jal=%0d jalr=%0d lw=%0d sw=%0d",
             n_beq_taken, n_beq_not, n_jal, n_jalr, n_lw, n_sw);
    check(n_fwd_m > 0, "forwarding from MEM never happened");
    check(n_fwd_w > 0, "forwarding from WB never happened");
    check(n_stall > 0, "load-use stall never happened");
    check((PEN == 2) ? (n_flush_m == 0) : (n_flush_m > 0), "FlushM count does not match the configuration");
    check(n_gpr_bypass > 0, "same-cycle GPR write/read never happened");
    check(n_beq_taken > 0 && n_beq_not > 0, "beq taken/not taken not both seen");
    check(n_jal > 0 && n_jalr > 0, "jal/jalr not both seen");
    check(n_lw > 0 && n_sw > 0, "lw/sw not both seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 2_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
