// picorv_pipe: five-stage pipelined picoRISC-V core (IF, ID/OF, EX, MEM, WB).
//
// Each instruction passes through five stages separated by interstage
// registers that move data and control signals forward at the rising clock
// edge, so up to five instructions are in flight and one can complete per
// cycle. Instruction and data memories are separate (Harvard), so the IF and
// MEM stages never compete for a memory and there are no structural hazards.
//
//   IF     PC addresses the instruction memory; PC+4 is computed.
//   ID/OF  control unit and immediate decoder; GPR set read (rs1, rs2).
//   EX     forwarding muxes, ALU (with Zero), branch target PC+imm, or the
//          ALU result for jalr; BranchOutcome = BranchBeq&Zero | jal | jalr.
//   MEM    data memory; jal/jalr replace the ALU result with PC+4; this
//          result is also what is forwarded from MEM.
//   WB     resW = loaded data or ALU result, written to rd.
//
// Hazards are handled by the hazard management unit (hmu): forwarding from
// MEM and WB, a one-cycle stall for a load followed by a user of its result,
// and flushing of wrongly fetched instructions after a taken control transfer.
// BRANCH_IN_MEM selects where beq/jal/jalr load the PC:
//   1 (default): in MEM, with BranchOutcome and BranchTarget carried through
//     the EX/MEM register. This removes the hazard logic from the EX critical
//     path; a taken transfer costs 3 bubbles (FlushD, FlushE, FlushM).
//   0: in EX; a taken transfer costs 2 bubbles (FlushD, FlushE).
//
// Interface: clk, active-low asynchronous rst_n (PC and all interstage
// registers and GPRs cleared; execution starts at address 0). imem_we,
// imem_addr (byte address) and imem_wdata load the instruction memory, to be
// used while the core is held in reset. pc_f, and reg_write_w/rd_w/res_w (the
// write-back port of the GPR set), are brought out for observation.
// Three concurrent assertions state the stall/flush rules of the pipeline.
// The stage structure, signal names, forwarding, stall and flush rules follow
// the pipeline description; memory sizes, reset behaviour, the load port and
// the encodings of the control signals are this design's own choices.
module picorv_pipe
  import picorv_pkg::*;
#(
  parameter int unsigned IMEM_WORDS    = 1024,
  parameter int unsigned DMEM_WORDS    = 1024,
  parameter bit          BRANCH_IN_MEM = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      imem_we,
  input  word_t     imem_addr,
  input  word_t     imem_wdata,
  output word_t     pc_f,
  output logic      reg_write_w,
  output reg_addr_t rd_w,
  output word_t     res_w
);

  // hazard unit outputs
  fwd_sel_e forward_a_e, forward_b_e;
  logic     stall_f, stall_d, flush_d, flush_e, flush_m, lw_stall;

  // PC redirect, from EX or MEM
  logic  pc_src;
  word_t pc_target;

  // ------------------------------------------------------------------ IF
  word_t pc_n, pc_plus4_f, instr_f;

  assign pc_plus4_f = pc_f + 32'd4;
  assign pc_n       = pc_src ? pc_target : pc_plus4_f;

  pipe_reg #(.T(word_t)) u_pc (
    .clk, .rst_n, .en(!stall_f), .clr(1'b0), .d(pc_n), .q(pc_f)
  );

  instr_memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(pc_f), .rd(instr_f),
    .load_we(imem_we), .load_addr(imem_addr), .load_data(imem_wdata)
  );

  if_id_t if_id_d, if_id_q;
  assign if_id_d = '{instr: instr_f, pc: pc_f, pc_plus4: pc_plus4_f};

  pipe_reg #(.T(if_id_t)) u_if_id (
    .clk, .rst_n, .en(!stall_d), .clr(flush_d), .d(if_id_d), .q(if_id_q)
  );

  // ------------------------------------------------------------------ ID/OF
  ctrl_t     ctrl_d;
  word_t     imm_d, rd1_d, rd2_d;
  reg_addr_t rs1_d, rs2_d, rdst_d;

  assign rs1_d  = if_id_q.instr[19:15];
  assign rs2_d  = if_id_q.instr[24:20];
  assign rdst_d = if_id_q.instr[11:7];

  control_unit u_cu (
    .opcode(if_id_q.instr[6:0]), .funct3(if_id_q.instr[14:12]),
    .funct7_5(if_id_q.instr[30]), .ctrl(ctrl_d)
  );

  imm_decode u_imm (
    .instr(if_id_q.instr[31:7]), .imm_control(ctrl_d.imm_control), .imm(imm_d)
  );

  gpr_set u_gpr (
    .clk, .rst_n, .a1(rs1_d), .a2(rs2_d), .a3(rd_w), .wd3(res_w),
    .we3(reg_write_w), .rd1(rd1_d), .rd2(rd2_d)
  );

  id_ex_t id_ex_d, id_ex_q;
  assign id_ex_d = '{ctrl: ctrl_d, rd1: rd1_d, rd2: rd2_d, imm: imm_d,
                     pc: if_id_q.pc, pc_plus4: if_id_q.pc_plus4,
                     rs1: rs1_d, rs2: rs2_d, rd: rdst_d};

  pipe_reg #(.T(id_ex_t)) u_id_ex (
    .clk, .rst_n, .en(1'b1), .clr(flush_e), .d(id_ex_d), .q(id_ex_q)
  );

  // ------------------------------------------------------------------ EX
  ex_mem_t ex_mem_d, ex_mem_q;
  word_t   result_m;  // MEM-stage result: ALU output, or PC+4 for jal/jalr
  word_t   src_a_e, src_b_e, write_data_e, alu_out_e, branch_target_e;
  logic    zero_e, branch_outcome_e;

  always_comb begin
    unique case (forward_a_e)
      FWD_M:   src_a_e = result_m;
      FWD_W:   src_a_e = res_w;
      default: src_a_e = id_ex_q.rd1;
    endcase
    unique case (forward_b_e)
      FWD_M:   write_data_e = result_m;
      FWD_W:   write_data_e = res_w;
      default: write_data_e = id_ex_q.rd2;
    endcase
  end

  assign src_b_e = id_ex_q.ctrl.alu_src ? id_ex_q.imm : write_data_e;

  alu u_alu (
    .src_a(src_a_e), .src_b(src_b_e), .alu_control(id_ex_q.ctrl.alu_control),
    .result(alu_out_e), .zero(zero_e)
  );

  assign branch_target_e  = id_ex_q.ctrl.branch_jalr ? alu_out_e
                                                     : id_ex_q.pc + id_ex_q.imm;
  assign branch_outcome_e = (id_ex_q.ctrl.branch_beq && zero_e) ||
                            id_ex_q.ctrl.branch_jal || id_ex_q.ctrl.branch_jalr;

  assign ex_mem_d = '{reg_write:      id_ex_q.ctrl.reg_write,
                      mem_to_reg:     id_ex_q.ctrl.mem_to_reg,
                      mem_write:      id_ex_q.ctrl.mem_write,
                      branch_jalx:    id_ex_q.ctrl.branch_jal || id_ex_q.ctrl.branch_jalr,
                      branch_outcome: branch_outcome_e,
                      branch_target:  branch_target_e,
                      alu_out:        alu_out_e,
                      write_data:     write_data_e,
                      pc_plus4:       id_ex_q.pc_plus4,
                      rd:             id_ex_q.rd};

  pipe_reg #(.T(ex_mem_t)) u_ex_mem (
    .clk, .rst_n, .en(1'b1), .clr(flush_m), .d(ex_mem_d), .q(ex_mem_q)
  );

  // ------------------------------------------------------------------ MEM
  word_t read_data_m;

  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(ex_mem_q.alu_out), .wd(ex_mem_q.write_data),
    .we(ex_mem_q.mem_write), .rd(read_data_m)
  );

  if (BRANCH_IN_MEM) begin : g_branch_mem
    assign pc_src    = ex_mem_q.branch_outcome;
    assign pc_target = ex_mem_q.branch_target;
  end else begin : g_branch_ex
    assign pc_src    = branch_outcome_e;
    assign pc_target = branch_target_e;
  end

  assign result_m = ex_mem_q.branch_jalx ? ex_mem_q.pc_plus4 : ex_mem_q.alu_out;

  mem_wb_t mem_wb_d, mem_wb_q;
  assign mem_wb_d = '{reg_write:  ex_mem_q.reg_write,
                      mem_to_reg: ex_mem_q.mem_to_reg,
                      alu_out:    result_m,
                      read_data:  read_data_m,
                      rd:         ex_mem_q.rd};

  pipe_reg #(.T(mem_wb_t)) u_mem_wb (
    .clk, .rst_n, .en(1'b1), .clr(1'b0), .d(mem_wb_d), .q(mem_wb_q)
  );

  // ------------------------------------------------------------------ WB
  assign reg_write_w = mem_wb_q.reg_write;
  assign rd_w        = mem_wb_q.rd;
  assign res_w       = mem_wb_q.mem_to_reg ? mem_wb_q.read_data : mem_wb_q.alu_out;

  // ------------------------------------------------------------------ HMU
  hmu #(.BRANCH_IN_MEM(BRANCH_IN_MEM)) u_hmu (
    .rs1_d, .rs2_d, .use_rs1_d(ctrl_d.use_rs1), .use_rs2_d(ctrl_d.use_rs2),
    .rs1_e(id_ex_q.rs1), .rs2_e(id_ex_q.rs2), .rd_e(id_ex_q.rd),
    .mem_to_reg_e(id_ex_q.ctrl.mem_to_reg),
    .rd_m(ex_mem_q.rd), .reg_write_m(ex_mem_q.reg_write),
    .rd_w(mem_wb_q.rd), .reg_write_w(mem_wb_q.reg_write),
    .branch_outcome(pc_src),
    .forward_a_e, .forward_b_e, .stall_f, .stall_d,
    .flush_d, .flush_e, .flush_m, .lw_stall
  );

  // ------------------------------------------------------------------ rules
  // A stalled stage is never flushed at the same time: a taken transfer
  // cancels the stall.
  a_no_stall_and_flush: assert property (@(posedge clk) disable iff (!rst_n)
    !(stall_d && flush_d));
  // While IF is stalled the PC holds its value.
  a_pc_holds: assert property (@(posedge clk) disable iff (!rst_n)
    stall_f |=> $stable(pc_f));
  // A bubble inserted for a load-use stall carries no register or memory write.
  a_bubble_is_nop: assert property (@(posedge clk) disable iff (!rst_n)
    flush_e |=> !(id_ex_q.ctrl.reg_write || id_ex_q.ctrl.mem_write));

endmodule
