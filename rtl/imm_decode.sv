// imm_decode: the immediate decoder ("Imm. Decode") of the ID/OF stage.
//
// Combinational. Takes instruction bits [31:7] and immControl and returns the
// sign-extended 32-bit immediate ImmOp in the RV32I I, S, B or J format. The
// block, its input Instr[31:7] and its control input follow the pipeline
// schematic; the format list is what lw/addi/jalr (I), sw (S), beq (B) and
// jal (J) need. B and J immediates are byte offsets with bit 0 zero.
module imm_decode
  import picorv_pkg::*;
(
  input  logic [31:7] instr,
  input  imm_sel_e    imm_control,
  output word_t       imm
);

  always_comb begin
    unique case (imm_control)
      IMM_I: imm = {{20{instr[31]}}, instr[31:20]};
      IMM_S: imm = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      IMM_B: imm = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
      IMM_J: imm = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};
      default: imm = '0;
    endcase
  end

endmodule
