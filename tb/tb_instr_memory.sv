// tb_instr_memory: self-checking test of the instruction memory. Words are
// written through the load port at random addresses and read back through
// the fetch port in the same cycle they are addressed (asynchronous read),
// against an array model; the low two address bits must be ignored.
module tb_instr_memory;
  import picorv_pkg::*;

  localparam int W = 256;
  logic clk = 0, load_we = 0;
  word_t addr = '0, rd, load_addr = '0, load_data = '0;
  word_t model [W];
  bit    valid [W];
  int checks = 0, failures = 0;

  instr_memory #(.WORDS(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    foreach (valid[i]) valid[i] = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 32'(4 * i); load_data = $urandom;
      model[i] = load_data; valid[i] = 1;
    end
    repeat (3000) begin
      @(negedge clk);
      load_we = ($urandom_range(0, 2) == 0);
      load_addr = {22'd0, 8'($urandom), 2'($urandom)};
      load_data = $urandom;
      addr = {22'd0, 8'($urandom), 2'($urandom)};
      #1;
      checks++;
      if (rd !== model[addr[9:2]]) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%h rd=%h expected %h", addr, rd, model[addr[9:2]]);
      end
      @(posedge clk);
      if (load_we) model[load_addr[9:2]] = load_data;
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
