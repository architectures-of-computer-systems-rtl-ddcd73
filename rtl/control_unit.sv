// control_unit: the main decoder of the ID/OF stage.
//
// Combinational. From opcode, funct3 and funct7[5] of the instruction it
// produces the control signals that travel down the pipeline with the
// instruction: BranchBeq, BranchJal, BranchJalr, RegWrite, MemToReg, MemWrite,
// ALUControl, ALUSrc and immControl, as named in the pipeline schematic. It
// also reports whether the instruction reads rs1 and rs2 (use_rs1, use_rs2);
// the hazard unit uses them so that a field that is not a register number
// (as in jal) causes no stall. That pair, the ALUControl encoding, and the
// choice that an unsupported instruction decodes as a no-op, are this design's
// own. jal and jalr use the ALU to add rs1 (jalr) and the immediate; their
// write-back value PC+4 is chosen later in MEM.
module control_unit
  import picorv_pkg::*;
(
  input  logic [6:0] opcode,
  input  logic [2:0] funct3,
  input  logic       funct7_5,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = CTRL_NOP;
    ctrl.alu_control = ALU_ADD;
    ctrl.imm_control = IMM_I;
    unique case (opcode)
      OP_R: begin
        ctrl.reg_write = 1'b1;
        ctrl.use_rs1   = 1'b1;
        ctrl.use_rs2   = 1'b1;
        unique case (funct3)
          3'b000:  ctrl.alu_control = funct7_5 ? ALU_SUB : ALU_ADD;
          3'b111:  ctrl.alu_control = ALU_AND;
          3'b110:  ctrl.alu_control = ALU_OR;
          3'b010:  ctrl.alu_control = ALU_SLT;
          default: ctrl.reg_write   = 1'b0;
        endcase
      end
      OP_IMM: begin
        if (funct3 == 3'b000) begin  // addi
          ctrl.reg_write = 1'b1;
          ctrl.use_rs1   = 1'b1;
          ctrl.alu_src   = 1'b1;
        end
      end
      OP_LOAD: begin
        if (funct3 == 3'b010) begin  // lw
          ctrl.reg_write  = 1'b1;
          ctrl.mem_to_reg = 1'b1;
          ctrl.use_rs1    = 1'b1;
          ctrl.alu_src    = 1'b1;
        end
      end
      OP_STORE: begin
        if (funct3 == 3'b010) begin  // sw
          ctrl.mem_write   = 1'b1;
          ctrl.use_rs1     = 1'b1;
          ctrl.use_rs2     = 1'b1;
          ctrl.alu_src     = 1'b1;
          ctrl.imm_control = IMM_S;
        end
      end
      OP_BR: begin
        if (funct3 == 3'b000) begin  // beq
          ctrl.branch_beq  = 1'b1;
          ctrl.use_rs1     = 1'b1;
          ctrl.use_rs2     = 1'b1;
          ctrl.alu_control = ALU_SUB;
          ctrl.imm_control = IMM_B;
        end
      end
      OP_JAL: begin
        ctrl.branch_jal  = 1'b1;
        ctrl.reg_write   = 1'b1;
        ctrl.imm_control = IMM_J;
      end
      OP_JALR: begin
        if (funct3 == 3'b000) begin
          ctrl.branch_jalr = 1'b1;
          ctrl.reg_write   = 1'b1;
          ctrl.use_rs1     = 1'b1;
          ctrl.alu_src     = 1'b1;
        end
      end
      default: ;
    endcase
  end

endmodule
