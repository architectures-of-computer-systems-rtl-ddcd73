// tb_gpr_set: self-checking test of the register set. Random writes and reads
// against an array model; x0 must read zero even after a write; a read of the
// register being written in the same cycle must return the new value
// (write-before-read within one cycle); reset clears every register.
module tb_gpr_set;
  import picorv_pkg::*;

  logic clk = 0, rst_n = 0, we3 = 0;
  reg_addr_t a1 = '0, a2 = '0, a3 = '0;
  word_t wd3 = '0, rd1, rd2;
  word_t model [32];
  int checks = 0, failures = 0, n_bypass = 0;

  gpr_set dut (.*);

  always #5 clk = ~clk;

  task automatic chk(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    #12 rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); a1 = 5'(i); a2 = 5'(31 - i); #1;
      chk(rd1, '0, "after reset"); chk(rd2, '0, "after reset");
    end
    repeat (4000) begin
      @(negedge clk);
      we3 = ($urandom_range(0, 1) == 1);
      a3 = 5'($urandom);
      wd3 = $urandom;
      a1 = ($urandom_range(0, 3) == 0) ? a3 : 5'($urandom);
      a2 = ($urandom_range(0, 3) == 0) ? a3 : 5'($urandom);
      #1;
      // value seen in the cycle of the write: the new one
      chk(rd1, (a1 == 0) ? '0 : (we3 && a3 == a1) ? wd3 : model[a1], "rd1");
      chk(rd2, (a2 == 0) ? '0 : (we3 && a3 == a2) ? wd3 : model[a2], "rd2");
      if (we3 && a3 != 0 && (a1 == a3 || a2 == a3)) n_bypass++;
      @(posedge clk);
      if (we3 && a3 != 0) model[a3] = wd3;
    end
    checks++;
    if (n_bypass == 0) failures++;
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
