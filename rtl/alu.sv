// alu: the arithmetic-logic unit of the EX stage.
//
// Combinational. Computes SrcA op SrcB for the operation selected by
// ALUControl (add, sub, and, or, slt) and raises Zero when the result is zero;
// beq uses the difference of its two registers and Zero to decide the branch.
// The set of operations follows the instructions of the pipeline examples; the
// encoding of ALUControl (picorv_pkg::alu_op_e) is this design's own.
module alu
  import picorv_pkg::*;
(
  input  word_t   src_a,
  input  word_t   src_b,
  input  alu_op_e alu_control,
  output word_t   result,
  output logic    zero
);

  always_comb begin
    unique case (alu_control)
      ALU_ADD: result = src_a + src_b;
      ALU_SUB: result = src_a - src_b;
      ALU_AND: result = src_a & src_b;
      ALU_OR:  result = src_a | src_b;
      ALU_SLT: result = {31'd0, $signed(src_a) < $signed(src_b)};
      default: result = src_a + src_b;
    endcase
  end

  assign zero = (result == '0);

endmodule
