// tb_rv_pkg: test support for the pipelined picoRISC-V core.
//
// Holds an assembler for the supported RV32I subset (add, sub, and, or, slt,
// addi, lw, sw, beq, jal, jalr), a generator of random, always-terminating
// programs, and an instruction-level reference model that executes a program
// one instruction at a time. The model knows nothing about the pipeline; it
// yields the architectural results, the order of register writes, and the
// number of taken control transfers and load-use pairs in the executed
// instruction stream, from which the testbench predicts the cycle count.
package tb_rv_pkg;

  typedef logic [31:0] word_t;

  // ---------------------------------------------------------------- assembler
  function automatic word_t enc_r(int f7, int rs2, int rs1, int f3, int rd);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'b0110011};
  endfunction
  function automatic word_t a_add(int rd, int rs1, int rs2); return enc_r(0, rs2, rs1, 0, rd); endfunction
  function automatic word_t a_sub(int rd, int rs1, int rs2); return enc_r(32, rs2, rs1, 0, rd); endfunction
  function automatic word_t a_and(int rd, int rs1, int rs2); return enc_r(0, rs2, rs1, 7, rd); endfunction
  function automatic word_t a_or (int rd, int rs1, int rs2); return enc_r(0, rs2, rs1, 6, rd); endfunction
  function automatic word_t a_slt(int rd, int rs1, int rs2); return enc_r(0, rs2, rs1, 2, rd); endfunction
  function automatic word_t a_addi(int rd, int rs1, int imm);
    return {12'(imm), 5'(rs1), 3'b000, 5'(rd), 7'b0010011};
  endfunction
  function automatic word_t a_lw(int rd, int imm, int rs1);
    return {12'(imm), 5'(rs1), 3'b010, 5'(rd), 7'b0000011};
  endfunction
  function automatic word_t a_sw(int rs2, int imm, int rs1);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'b010, i[4:0], 7'b0100011};
  endfunction
  function automatic word_t a_beq(int rs1, int rs2, int off);
    logic [12:0] i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), 3'b000, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic word_t a_jal(int rd, int off);
    logic [20:0] i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic word_t a_jalr(int rd, int rs1, int imm);
    return {12'(imm), 5'(rs1), 3'b000, 5'(rd), 7'b1100111};
  endfunction

  // ---------------------------------------------------------------- model
  class rv_model;
    int unsigned imem_words, dmem_words;
    word_t imem[];
    word_t dmem[];
    word_t regs[32];
    word_t pc;
    // results of the last step
    bit    wrote;
    int    wrd;
    word_t wval;
    bit    taken;
    bit    is_load;
    int    rd_f, rs1_f, rs2_f;
    bit    use1, use2;

    function new(int unsigned iw, int unsigned dw);
      imem_words = iw;
      dmem_words = dw;
      imem = new[iw];
      dmem = new[dw];
      foreach (imem[i]) imem[i] = 32'h0000_0013;  // addi x0,x0,0
      foreach (regs[i]) regs[i] = '0;
      pc = '0;
    endfunction

    function automatic int didx(word_t a);
      return int'((a >> 2) % dmem_words);
    endfunction

    function automatic word_t simm(logic [11:0] v);
      return {{20{v[11]}}, v};
    endfunction

    // Execute the instruction at pc.
    function void step();
      word_t ins = imem[(pc >> 2) % imem_words];
      logic [6:0] op = ins[6:0];
      logic [2:0] f3 = ins[14:12];
      word_t a, b, npc;
      rd_f = int'(ins[11:7]); rs1_f = int'(ins[19:15]); rs2_f = int'(ins[24:20]);
      a = regs[rs1_f]; b = regs[rs2_f];
      wrote = 0; taken = 0; is_load = 0; use1 = 0; use2 = 0;
      wval = '0; wrd = rd_f;
      npc = pc + 4;
      case (op)
        7'b0110011: begin
          use1 = 1; use2 = 1;
          wrote = 1;
          case (f3)
            3'd0: wval = ins[30] ? a - b : a + b;
            3'd7: wval = a & b;
            3'd6: wval = a | b;
            3'd2: wval = ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
            default: wrote = 0;
          endcase
        end
        7'b0010011: begin use1 = 1; wrote = 1; wval = a + simm(ins[31:20]); end
        7'b0000011: begin
          use1 = 1; wrote = 1; is_load = 1;
          wval = dmem[didx(a + simm(ins[31:20]))];
        end
        7'b0100011: begin
          use1 = 1; use2 = 1;
          dmem[didx(a + simm({ins[31:25], ins[11:7]}))] = b;
        end
        7'b1100011: begin
          use1 = 1; use2 = 1;
          if (a == b) begin
            taken = 1;
            npc = pc + {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
          end
        end
        7'b1101111: begin
          wrote = 1; wval = pc + 4; taken = 1;
          npc = pc + {{11{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0};
        end
        7'b1100111: begin
          use1 = 1; wrote = 1; wval = pc + 4; taken = 1;
          npc = a + simm(ins[31:20]);
        end
        default: ;
      endcase
      if (wrote && rd_f != 0) regs[rd_f] = wval;
      if (rd_f == 0) wrote = 0;
      pc = npc;
    endfunction
  endclass

  // ---------------------------------------------------------------- generator
  // Random program of n instructions using x1..x7 (many dependencies), then
  // the end marker "addi x31,x0,1" and the halt loop "jal x0,0". Every jump
  // goes forward, so the program always reaches the marker.
  function automatic void gen_program(ref word_t prog[$], input int n);
    int i = 0;
    prog.delete();
    while (i < n) begin
      int k = $urandom_range(0, 99);
      int rd = $urandom_range(1, 7), r1 = $urandom_range(0, 7), r2 = $urandom_range(0, 7);
      int rem = n - i;  // instructions left before the marker
      if (k < 30) begin
        case ($urandom_range(0, 4))
          0: prog.push_back(a_add(rd, r1, r2));
          1: prog.push_back(a_sub(rd, r1, r2));
          2: prog.push_back(a_and(rd, r1, r2));
          3: prog.push_back(a_or(rd, r1, r2));
          default: prog.push_back(a_slt(rd, r1, r2));
        endcase
        i++;
      end else if (k < 45) begin
        prog.push_back(a_addi(rd, r1, $urandom_range(0, 4095) - 2048)); i++;
      end else if (k < 60) begin
        prog.push_back(a_lw(rd, 4 * $urandom_range(0, 15), ($urandom_range(0, 3) == 0) ? r1 : 0)); i++;
      end else if (k < 72) begin
        prog.push_back(a_sw(r2, 4 * $urandom_range(0, 15), ($urandom_range(0, 3) == 0) ? r1 : 0)); i++;
      end else if (k < 86) begin
        int off = $urandom_range(1, (rem < 5) ? rem : 5);
        prog.push_back(a_beq(r1, ($urandom_range(0, 1) == 0) ? r1 : r2, 4 * off)); i++;
      end else if (k < 93) begin
        int off = $urandom_range(1, (rem < 5) ? rem : 5);
        prog.push_back(a_jal(($urandom_range(0, 3) == 0) ? 0 : rd, 4 * off)); i++;
      end else if (rem >= 2) begin
        // addi rb, x0, target ; jalr rd, 0(rb) with target forward of the jalr
        int rb = $urandom_range(1, 7);
        int off = $urandom_range(1, (rem - 1 < 5) ? rem - 1 : 5);
        int tgt = 4 * (i + 1 + off);
        prog.push_back(a_addi(rb, 0, tgt));
        prog.push_back(a_jalr(rd, rb, 0));
        i += 2;
      end
    end
    // A jump that lands on the jalr of a pair would use a stale base register;
    // move such a target one instruction further (forward jumps only, so the
    // fix never creates a new such landing).
    foreach (prog[j]) begin
      word_t ins = prog[j];
      if (ins[6:0] == 7'b1100011 || ins[6:0] == 7'b1101111) begin
        int off = (ins[6:0] == 7'b1100011)
                  ? int'({ins[31], ins[7], ins[30:25], ins[11:8], 1'b0})
                  : int'({ins[31], ins[19:12], ins[20], ins[30:21], 1'b0});
        int t = j + off / 4;
        if (t < prog.size() && prog[t][6:0] == 7'b1100111) begin
          if (ins[6:0] == 7'b1100011) prog[j] = a_beq(int'(ins[19:15]), int'(ins[24:20]), off + 4);
          else                        prog[j] = a_jal(int'(ins[11:7]), off + 4);
        end
      end
      if (ins[6:0] == 7'b1100111 && j > 0) begin
        int t = int'(prog[j-1][31:20]) / 4;  // target set by the pair's addi
        if (t < prog.size() && prog[t][6:0] == 7'b1100111)
          prog[j-1] = a_addi(int'(prog[j-1][11:7]), 0, 4 * (t + 1));
      end
    end
    prog.push_back(a_addi(31, 0, 1));
    prog.push_back(a_jal(0, 0));
  endfunction

endpackage
