// hmu: the hazard management unit of the pipeline.
//
// Combinational. Three jobs:
//  * Forwarding (RAW hazards): ForwardAE/ForwardBE select, for each ALU
//    source in EX, the register value (00), resW from WB (01) or the MEM
//    result ALUOutM (10). MEM has priority because it holds the younger
//    result. A destination x0 is never forwarded.
//  * Load-use stall: when a lw is in EX (MemToRegE) and the instruction in
//    ID/OF reads its destination rdE, StallF and StallD freeze the PC and the
//    IF/ID register and FlushE turns the ID/EX register into a bubble. One
//    cycle later the loaded value is forwarded from WB.
//  * Control hazards: when a taken beq, jal or jalr is resolved
//    (BranchOutcome), the younger instructions already fetched are flushed:
//    FlushD and FlushE when resolution is in EX (BRANCH_IN_MEM = 0, 2 bubbles),
//    and FlushM as well when it is in MEM (BRANCH_IN_MEM = 1, 3 bubbles).
//    A flush overrides a load-use stall, since the stalled instruction is
//    itself on the wrong path.
// The rules follow the pipeline description; the use_rs1D/use_rs2D inputs
// (does the ID/OF instruction read that register) stand in for "the ID/OF
// instruction is an ALU op", and the x0 exclusion is this design's own.
module hmu
  import picorv_pkg::*;
#(
  parameter bit BRANCH_IN_MEM = 1'b1
) (
  // ID/OF stage
  input  reg_addr_t rs1_d,
  input  reg_addr_t rs2_d,
  input  logic      use_rs1_d,
  input  logic      use_rs2_d,
  // EX stage
  input  reg_addr_t rs1_e,
  input  reg_addr_t rs2_e,
  input  reg_addr_t rd_e,
  input  logic      mem_to_reg_e,
  // MEM stage
  input  reg_addr_t rd_m,
  input  logic      reg_write_m,
  // WB stage
  input  reg_addr_t rd_w,
  input  logic      reg_write_w,
  // taken control transfer, from EX or MEM depending on BRANCH_IN_MEM
  input  logic      branch_outcome,
  output fwd_sel_e  forward_a_e,
  output fwd_sel_e  forward_b_e,
  output logic      stall_f,
  output logic      stall_d,
  output logic      flush_d,
  output logic      flush_e,
  output logic      flush_m,
  output logic      lw_stall   // load-use hazard detected (for observation)
);

  function automatic fwd_sel_e fwd(reg_addr_t rs);
    if (reg_write_m && rd_m != '0 && rd_m == rs)      return FWD_M;
    else if (reg_write_w && rd_w != '0 && rd_w == rs) return FWD_W;
    else                                              return FWD_REG;
  endfunction

  assign forward_a_e = fwd(rs1_e);
  assign forward_b_e = fwd(rs2_e);

  assign lw_stall = mem_to_reg_e && rd_e != '0 &&
                    ((use_rs1_d && rs1_d == rd_e) || (use_rs2_d && rs2_d == rd_e));

  assign stall_f = lw_stall && !branch_outcome;
  assign stall_d = lw_stall && !branch_outcome;
  assign flush_d = branch_outcome;
  assign flush_e = lw_stall || branch_outcome;
  assign flush_m = BRANCH_IN_MEM && branch_outcome;

endmodule
