// tb_control_unit: self-checking test of the main decoder. For each supported
// instruction, with random register fields, the control word is compared with
// a table written from the meaning of the instruction; unsupported encodings
// must decode to a bubble (no register write, no memory write, no branch).
module tb_control_unit;
  import picorv_pkg::*;

  logic [31:0] ins;
  ctrl_t c;
  int checks = 0, failures = 0;

  control_unit dut (.opcode(ins[6:0]), .funct3(ins[14:12]), .funct7_5(ins[30]), .ctrl(c));

  // expected: {beq, jal, jalr, regwrite, memtoreg, memwrite, alusrc, use1, use2}
  task automatic try(string nm, logic [6:0] op, logic [2:0] f3, logic [6:0] f7,
                     logic [8:0] flags, alu_op_e aop, imm_sel_e isel, bit chk_alu, bit chk_imm);
    logic [8:0] got;
    ins = {f7, 5'($urandom), 5'($urandom), f3, 5'($urandom), op};
    #1;
    got = {c.branch_beq, c.branch_jal, c.branch_jalr, c.reg_write, c.mem_to_reg,
           c.mem_write, c.alu_src, c.use_rs1, c.use_rs2};
    checks++;
    if (got !== flags || (chk_alu && c.alu_control !== aop) || (chk_imm && c.imm_control !== isel)) begin
      failures++;
      $display("FAIL %s flags=%b expected %b alu=%s imm=%s", nm, got, flags,
               c.alu_control.name(), c.imm_control.name());
    end
  endtask

  initial begin
    repeat (20) begin
      try("add",  7'b0110011, 3'd0, 7'h00, 9'b000100011, ALU_ADD, IMM_I, 1, 0);
      try("sub",  7'b0110011, 3'd0, 7'h20, 9'b000100011, ALU_SUB, IMM_I, 1, 0);
      try("and",  7'b0110011, 3'd7, 7'h00, 9'b000100011, ALU_AND, IMM_I, 1, 0);
      try("or",   7'b0110011, 3'd6, 7'h00, 9'b000100011, ALU_OR,  IMM_I, 1, 0);
      try("slt",  7'b0110011, 3'd2, 7'h00, 9'b000100011, ALU_SLT, IMM_I, 1, 0);
      try("addi", 7'b0010011, 3'd0, 7'($urandom), 9'b000100110, ALU_ADD, IMM_I, 1, 1);
      try("lw",   7'b0000011, 3'd2, 7'($urandom), 9'b000110110, ALU_ADD, IMM_I, 1, 1);
      try("sw",   7'b0100011, 3'd2, 7'($urandom), 9'b000001111, ALU_ADD, IMM_S, 1, 1);
      try("beq",  7'b1100011, 3'd0, 7'($urandom), 9'b100000011, ALU_SUB, IMM_B, 1, 1);
      try("jal",  7'b1101111, 3'($urandom), 7'($urandom), 9'b010100000, ALU_ADD, IMM_J, 0, 1);
      try("jalr", 7'b1100111, 3'd0, 7'($urandom), 9'b001100110, ALU_ADD, IMM_I, 1, 1);
      try("bne",  7'b1100011, 3'd1, 7'($urandom), 9'b000000000, ALU_ADD, IMM_I, 0, 0);
      try("lui",  7'b0110111, 3'($urandom), 7'($urandom), 9'b000000000, ALU_ADD, IMM_I, 0, 0);
      try("lb",   7'b0000011, 3'd0, 7'($urandom), 9'b000000000, ALU_ADD, IMM_I, 0, 0);
      try("zero", 7'b0000000, 3'd0, 7'h00, 9'b000000000, ALU_ADD, IMM_I, 0, 0);
    end
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
