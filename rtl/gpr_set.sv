// gpr_set: the general-purpose register set (x0..x31) of the ID/OF stage.
//
// Two asynchronous read ports (A1/RD1, A2/RD2) and one write port
// (A3/WD3/WE3) written at the rising clock edge. x0 always reads as zero.
// The pipeline needs a register written by WB to be readable by ID/OF in the
// same cycle ("write in the first half, read in the second half"). With a
// single clock edge this design obtains the same effect with an internal
// bypass: a read of the register being written returns WD3 in that cycle.
// Clearing all registers at reset is this design's own choice.
module gpr_set
  import picorv_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  reg_addr_t a1,
  input  reg_addr_t a2,
  input  reg_addr_t a3,
  input  word_t     wd3,
  input  logic      we3,
  output word_t     rd1,
  output word_t     rd2
);

  word_t regs [1:NREGS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < NREGS; i++) regs[i] <= '0;
    end else if (we3 && a3 != '0) begin
      regs[a3] <= wd3;
    end
  end

  function automatic word_t read_port(reg_addr_t a);
    if (a == '0)                 return '0;
    else if (we3 && a3 == a)     return wd3;
    else                         return regs[a];
  endfunction

  assign rd1 = read_port(a1);
  assign rd2 = read_port(a2);

endmodule
