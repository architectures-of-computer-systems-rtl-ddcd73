// tb_alu: self-checking test of the ALU. Random and corner operands for every
// operation; the expected result and Zero flag are computed here with
// SystemVerilog operators on the raw operands.
module tb_alu;
  import picorv_pkg::*;

  word_t a, b, y;
  alu_op_e op;
  logic z;
  int checks = 0, failures = 0;

  alu dut (.src_a(a), .src_b(b), .alu_control(op), .result(y), .zero(z));

  function automatic word_t ref_alu(alu_op_e o, word_t x, word_t w);
    case (o)
      ALU_ADD: return x + w;
      ALU_SUB: return x - w;
      ALU_AND: return x & w;
      ALU_OR:  return x | w;
      ALU_SLT: return (int'(x) < int'(w)) ? 32'd1 : 32'd0;
      default: return 'x;
    endcase
  endfunction

  task automatic try(alu_op_e o, word_t x, word_t w);
    word_t e;
    op = o; a = x; b = w;
    #1;
    e = ref_alu(o, x, w);
    checks++;
    if (y !== e || z !== (e == 0)) begin
      failures++;
      if (failures < 10) $display("FAIL op=%s a=%h b=%h y=%h z=%b expected %h", o.name(), x, w, y, z, e);
    end
  endtask

  initial begin
    static alu_op_e ops[5] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_SLT};
    static word_t corner[6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h7fff_ffff, 32'h8000_0000, 32'h1234_5678};
    foreach (ops[i]) foreach (corner[j]) foreach (corner[k]) try(ops[i], corner[j], corner[k]);
    repeat (5000) try(ops[$urandom_range(0, 4)], $urandom, ($urandom_range(0, 3) == 0) ? a : $urandom);
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
