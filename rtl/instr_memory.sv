// instr_memory: the instruction memory (instruction cache) read in the IF stage.
//
// WORDS 32-bit words, read asynchronously at the word selected by the byte
// address A (bits [1:0] ignored), so an instruction is available in the cycle
// its PC is presented, as the single-cycle memory of the pipeline assumes. A
// synchronous write port (load_we, load_addr, load_data) lets a host place a
// program in the memory; the pipeline itself never writes it. The size and the
// load port are this design's own choices: the pipeline only names the block.
module instr_memory
  import picorv_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic  clk,
  input  word_t addr,
  output word_t rd,
  input  logic  load_we,
  input  word_t load_addr,
  input  word_t load_data
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[AW+1:2]] <= load_data;
  end

  assign rd = mem[addr[AW+1:2]];

endmodule
