// pipe_reg: an interstage register of the instruction pipeline.
//
// Holds one stage's data and control signals (any packed type T) and passes
// them on at the rising clock edge. Two control inputs, as in the pipeline
// schematic: EN low freezes the contents (a stall), CLR high loads
// CLEAR_VAL at the next edge (inserting a bubble or flushing an instruction).
// CLR wins over EN. CLR is synchronous; rst_n is an asynchronous reset to
// CLEAR_VAL, which is this design's own choice.
module pipe_reg #(
  parameter type T = logic [31:0],
  parameter T CLEAR_VAL = '0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic clr,
  input  T     d,
  output T     q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= CLEAR_VAL;
    else if (clr) q <= CLEAR_VAL;
    else if (en)  q <= d;
  end

endmodule
