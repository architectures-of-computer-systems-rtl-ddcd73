// picorv_pkg: types and constants shared by the pipelined picoRISC-V core.
//
// The core executes the RV32I subset used throughout the pipeline examples:
// add, sub, and, or, slt (R-type), addi (I-type), lw, sw, beq, jal and jalr.
// The control signal names (BranchBeq, BranchJal, BranchJalr, RegWrite,
// MemToReg, MemWrite, ALUControl, ALUSrc, immControl) follow the control unit
// of the pipeline. The numeric encodings of ALUControl and immControl are this
// design's own choice; the instruction encodings are the standard RV32I ones.
package picorv_pkg;

  localparam int unsigned XLEN = 32;
  localparam int unsigned NREGS = 32;
  localparam int unsigned RADDR_W = 5;

  typedef logic [XLEN-1:0]    word_t;
  typedef logic [RADDR_W-1:0] reg_addr_t;

  // RV32I major opcodes used by the core.
  localparam logic [6:0] OP_R    = 7'b0110011;
  localparam logic [6:0] OP_IMM  = 7'b0010011;
  localparam logic [6:0] OP_LOAD = 7'b0000011;
  localparam logic [6:0] OP_STORE= 7'b0100011;
  localparam logic [6:0] OP_BR   = 7'b1100011;
  localparam logic [6:0] OP_JAL  = 7'b1101111;
  localparam logic [6:0] OP_JALR = 7'b1100111;

  // ALUControl encoding.
  typedef enum logic [2:0] {
    ALU_ADD = 3'b000,
    ALU_SUB = 3'b001,
    ALU_AND = 3'b010,
    ALU_OR  = 3'b011,
    ALU_SLT = 3'b101
  } alu_op_e;

  // immControl: which immediate format Imm. Decode assembles.
  typedef enum logic [1:0] {
    IMM_I = 2'd0,
    IMM_S = 2'd1,
    IMM_B = 2'd2,
    IMM_J = 2'd3
  } imm_sel_e;

  // Forwarding select of the ALU operand multiplexers (inputs 00, 01, 10).
  typedef enum logic [1:0] {
    FWD_REG = 2'b00,  // value read from the GPR set in ID/OF
    FWD_W   = 2'b01,  // resW, the value being written back in WB
    FWD_M   = 2'b10   // ALUOutM, the result travelling through MEM
  } fwd_sel_e;

  // Control signals produced by the control unit in ID/OF.
  typedef struct packed {
    logic     branch_beq;
    logic     branch_jal;
    logic     branch_jalr;
    logic     reg_write;
    logic     mem_to_reg;
    logic     mem_write;
    alu_op_e  alu_control;
    logic     alu_src;      // 1: SrcB is the immediate
    imm_sel_e imm_control;
    logic     use_rs1;      // the instruction reads rs1
    logic     use_rs2;      // the instruction reads rs2
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{
    branch_beq: 1'b0, branch_jal: 1'b0, branch_jalr: 1'b0, reg_write: 1'b0,
    mem_to_reg: 1'b0, mem_write: 1'b0, alu_control: ALU_ADD, alu_src: 1'b0,
    imm_control: IMM_I, use_rs1: 1'b0, use_rs2: 1'b0};

  // IF -> ID/OF interstage register.
  typedef struct packed {
    word_t instr;
    word_t pc;
    word_t pc_plus4;
  } if_id_t;

  // ID/OF -> EX interstage register.
  typedef struct packed {
    ctrl_t     ctrl;
    word_t     rd1;
    word_t     rd2;
    word_t     imm;
    word_t     pc;
    word_t     pc_plus4;
    reg_addr_t rs1;
    reg_addr_t rs2;
    reg_addr_t rd;
  } id_ex_t;

  // EX -> MEM interstage register.
  typedef struct packed {
    logic      reg_write;
    logic      mem_to_reg;
    logic      mem_write;
    logic      branch_jalx;     // jal or jalr: write PC+4 to rd
    logic      branch_outcome;  // taken control transfer (used when resolved in MEM)
    word_t     branch_target;
    word_t     alu_out;
    word_t     write_data;
    word_t     pc_plus4;
    reg_addr_t rd;
  } ex_mem_t;

  // MEM -> WB interstage register.
  typedef struct packed {
    logic      reg_write;
    logic      mem_to_reg;
    word_t     alu_out;     // ALU result or PC+4 for jal/jalr
    word_t     read_data;
    reg_addr_t rd;
  } mem_wb_t;

endpackage
