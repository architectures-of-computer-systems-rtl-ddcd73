// tb_data_memory: self-checking test of the data memory. Random sw-like
// writes (taking effect at the clock edge) and lw-like reads (available in the
// same cycle) against an array model; a read of the word being written in the
// same cycle must still return the old value.
module tb_data_memory;
  import picorv_pkg::*;

  localparam int W = 256;
  logic clk = 0, we = 0;
  word_t addr = '0, wd = '0, rd;
  word_t model [W];
  int checks = 0, failures = 0;

  data_memory #(.WORDS(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      we = 1; addr = 32'(4 * i); wd = $urandom; model[i] = wd;
    end
    repeat (3000) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) == 0);
      addr = {22'd0, 8'($urandom), 2'($urandom)};
      wd = $urandom;
      #1;
      checks++;
      if (rd !== model[addr[9:2]]) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%h rd=%h expected %h", addr, rd, model[addr[9:2]]);
      end
      @(posedge clk);
      if (we) model[addr[9:2]] = wd;
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
