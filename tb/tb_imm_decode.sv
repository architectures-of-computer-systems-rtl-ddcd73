// tb_imm_decode: self-checking test of the immediate decoder. A random
// immediate of each format is scattered into instruction bits the way the
// RV32I encoding places it (I, S, B, J), with random bits in the other fields;
// the decoder must return the sign-extended immediate.
module tb_imm_decode;
  import picorv_pkg::*;

  logic [31:0] ins;
  imm_sel_e sel;
  word_t imm;
  int checks = 0, failures = 0;

  imm_decode dut (.instr(ins[31:7]), .imm_control(sel), .imm(imm));

  task automatic try(imm_sel_e s, int v);
    logic [31:0] r = $urandom;
    logic [31:0] e = 32'(v);
    case (s)
      IMM_I: begin e = {{20{e[11]}}, e[11:0]}; r[31:20] = e[11:0]; end
      IMM_S: begin e = {{20{e[11]}}, e[11:0]}; r[31:25] = e[11:5]; r[11:7] = e[4:0]; end
      IMM_B: begin e = {{19{e[12]}}, e[12:1], 1'b0};
                   r[31] = e[12]; r[7] = e[11]; r[30:25] = e[10:5]; r[11:8] = e[4:1]; end
      default: begin e = {{11{e[20]}}, e[20:1], 1'b0};
                   r[31] = e[20]; r[19:12] = e[19:12]; r[20] = e[11]; r[30:21] = e[10:1]; end
    endcase
    ins = r; sel = s;
    #1;
    checks++;
    if (imm !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s ins=%h imm=%h expected %h", s.name(), r, imm, e);
    end
  endtask

  initial begin
    static imm_sel_e sels[4] = '{IMM_I, IMM_S, IMM_B, IMM_J};
    foreach (sels[i]) begin
      try(sels[i], 0); try(sels[i], -2); try(sels[i], 2); try(sels[i], -4096); try(sels[i], 4094);
      repeat (1000) try(sels[i], int'($urandom));
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
