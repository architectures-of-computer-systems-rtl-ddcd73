// data_memory: the data memory (data cache) accessed in the MEM stage.
//
// WORDS 32-bit words addressed by the byte address A (bits [1:0] ignored):
// lw reads RD asynchronously in the same cycle, sw writes WD at the rising
// edge when WE is high. Only whole-word accesses exist, matching lw and sw.
// The size is this design's own choice.
module data_memory
  import picorv_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic  clk,
  input  word_t addr,
  input  word_t wd,
  input  logic  we,
  output word_t rd
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= wd;
  end

  assign rd = mem[addr[AW+1:2]];

endmodule
