// tb_isa_pkg: testbench helpers for the core's instruction set: encoders, a
// random program generator and an instruction-level reference model (iss) that
// computes the expected registers and data memory independently of the RTL.
package tb_isa_pkg;
  import rcmp_pkg::*;

  function automatic word_t enc_r(logic [5:0] op, int rd, int rs1, int rs2);
    return {op, 4'(rd), 4'(rs1), 4'(rs2), 14'd0};
  endfunction
  function automatic word_t enc_i(logic [5:0] op, int rd, int rs1, int imm);
    return {op, 4'(rd), 4'(rs1), 4'd0, 14'(imm)};
  endfunction
  function automatic word_t enc_sw(int rs2, int rs1, int imm);
    return {OP_SW, 4'd0, 4'(rs1), 4'(rs2), 14'(imm)};
  endfunction
  function automatic word_t enc_b(logic [5:0] op, int rs1, int rs2, int off);
    return {op, 4'd0, 4'(rs1), 4'(rs2), 14'(off)};
  endfunction
  function automatic word_t enc_lui(int rd, int imm18);
    return {OP_LUI, 4'(rd), 4'd0, 18'(imm18)};
  endfunction
  function automatic word_t enc_jal(int rd, int off);
    return {OP_JAL, 4'(rd), 4'd0, 18'(off)};
  endfunction
  function automatic word_t enc_halt();
    return {OP_HALT, 26'd0};
  endfunction

  localparam int DATA_BASE = 'h100;   // 32 words used by random loads and stores
  localparam int DUMP_BASE = 'h200;   // the epilogue stores r1..r15 here

  // reference model
  class iss;
    word_t prog [$];
    word_t mem  [int];
    word_t r    [16];
    int    steps;

    function word_t ld(int a);
      return mem.exists(a) ? mem[a] : 32'd0;
    endfunction

    function void run(int max_steps);
      int pc;
      pc = 0;
      steps = 0;
      foreach (r[i]) r[i] = '0;
      while (steps < max_steps) begin
        word_t ins, a, b, v, imm14, imm18;
        logic [5:0] op;
        int rd, rs1, rs2;
        logic wr;
        ins   = (pc / 4 < prog.size()) ? prog[pc / 4] : 32'd0;
        op    = ins[31:26];
        rd    = int'(ins[25:22]);
        rs1   = int'(ins[21:18]);
        rs2   = int'(ins[17:14]);
        imm14 = {{18{ins[13]}}, ins[13:0]};
        imm18 = {{14{ins[17]}}, ins[17:0]};
        a = r[rs1];
        b = r[rs2];
        wr = 1'b0;
        v = '0;
        steps++;
        if (op == OP_HALT) break;
        case (op)
          OP_ADD:  begin v = a + b; wr = 1; end
          OP_SUB:  begin v = a - b; wr = 1; end
          OP_AND:  begin v = a & b; wr = 1; end
          OP_OR:   begin v = a | b; wr = 1; end
          OP_XOR:  begin v = a ^ b; wr = 1; end
          OP_SLL:  begin v = a << b[4:0]; wr = 1; end
          OP_SRL:  begin v = a >> b[4:0]; wr = 1; end
          OP_SRA:  begin v = $signed(a) >>> b[4:0]; wr = 1; end
          OP_SLT:  begin v = ($signed(a) < $signed(b)) ? 1 : 0; wr = 1; end
          OP_SLTU: begin v = (a < b) ? 1 : 0; wr = 1; end
          OP_ADDI: begin v = a + imm14; wr = 1; end
          OP_ANDI: begin v = a & imm14; wr = 1; end
          OP_ORI:  begin v = a | imm14; wr = 1; end
          OP_XORI: begin v = a ^ imm14; wr = 1; end
          OP_SLLI: begin v = a << imm14[4:0]; wr = 1; end
          OP_SRLI: begin v = a >> imm14[4:0]; wr = 1; end
          OP_SLTI: begin v = ($signed(a) < $signed(imm14)) ? 1 : 0; wr = 1; end
          OP_LUI:  begin v = {ins[17:0], 14'd0}; wr = 1; end
          OP_LW:   begin v = ld(int'((a + imm14) & 32'h7ffc)); wr = 1; end
          OP_SW:   mem[int'((a + imm14) & 32'h7ffc)] = b;
          default: ;
        endcase
        if (wr && rd != 0) r[rd] = v;
        case (op)
          OP_BEQ:  pc = (a == b) ? pc + int'(imm14 << 2) : pc + 4;
          OP_BNE:  pc = (a != b) ? pc + int'(imm14 << 2) : pc + 4;
          OP_BLT:  pc = ($signed(a) <  $signed(b)) ? pc + int'(imm14 << 2) : pc + 4;
          OP_BGE:  pc = ($signed(a) >= $signed(b)) ? pc + int'(imm14 << 2) : pc + 4;
          OP_JAL:  begin if (rd != 0) r[rd] = pc + 4; pc = pc + int'(imm18 << 2); end
          OP_JALR: begin if (rd != 0) r[rd] = pc + 4; pc = int'((a + imm14) & ~32'd3); end
          default: pc = pc + 4;
        endcase
      end
    endfunction
  endclass

  // Random program: clearing of the data words, a register prologue, a counted loop with a call/return, a
  // random body with many close dependences, forward branches, loads and stores,
  // then an epilogue that stores r1..r15 to DUMP_BASE and halts.
  function automatic void gen_program(ref word_t p [$], input int n_body);
    int recent [3];
    recent = '{1, 2, 3};
    p.delete();
    for (int i = 0; i < 32; i++) p.push_back(enc_sw(0, 0, DATA_BASE + 4 * i));  // clear data
    for (int i = 1; i < 16; i++) begin
      p.push_back(enc_lui(i, int'($urandom_range(0, 262143))));
      p.push_back(enc_i(OP_ADDI, i, i, int'($urandom_range(0, 16383)) - 8192));
    end
    // counted loop: r1 = 3; body: r2 += r1; store r2; load it back into r3; r4 = r3 + r3
    // (load-use); call a subroutine with JAL and return with JALR
    p.push_back(enc_i(OP_ADDI, 1, 0, 3));
    p.push_back(enc_r(OP_ADD, 2, 2, 1));                   // L: pc = base + 4
    p.push_back(enc_sw(2, 0, DATA_BASE));
    p.push_back(enc_i(OP_LW, 3, 0, DATA_BASE));
    p.push_back(enc_r(OP_ADD, 4, 3, 3));
    p.push_back(enc_jal(15, 4));                           // call S (4 words ahead)
    p.push_back(enc_i(OP_ADDI, 1, 1, -1));
    p.push_back(enc_b(OP_BNE, 1, 0, -6));                  // back to L
    p.push_back(enc_jal(0, 3));                            // skip S
    p.push_back(enc_r(OP_XOR, 5, 5, 4));                   // S
    p.push_back(enc_i(OP_JALR, 0, 15, 0));                 // return
    for (int i = 0; i < n_body; i++) begin
      int kind, rd, rs1, rs2;
      kind = int'($urandom_range(0, 99));
      rd   = int'($urandom_range(1, 15));
      rs1  = ($urandom_range(0, 1) == 1) ? recent[$urandom_range(0, 2)] : int'($urandom_range(0, 15));
      rs2  = ($urandom_range(0, 1) == 1) ? recent[$urandom_range(0, 2)] : int'($urandom_range(0, 15));
      if (kind < 35) begin
        logic [5:0] ops [10];
        ops = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA, OP_SLT, OP_SLTU};
        p.push_back(enc_r(ops[$urandom_range(0, 9)], rd, rs1, rs2));
      end else if (kind < 55) begin
        logic [5:0] ops [7];
        ops = '{OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_SLLI, OP_SRLI, OP_SLTI};
        p.push_back(enc_i(ops[$urandom_range(0, 6)], rd, rs1, int'($urandom_range(0, 16383)) - 8192));
      end else if (kind < 72) begin
        p.push_back(enc_i(OP_LW, rd, 0, DATA_BASE + 4 * int'($urandom_range(0, 31))));
      end else if (kind < 86) begin
        p.push_back(enc_sw(rs2, 0, DATA_BASE + 4 * int'($urandom_range(0, 31))));
      end else if (kind < 97 && i < n_body - 4) begin
        logic [5:0] ops [4];
        ops = '{OP_BEQ, OP_BNE, OP_BLT, OP_BGE};
        p.push_back(enc_b(ops[$urandom_range(0, 3)], rs1, rs2, int'($urandom_range(2, 4))));
      end else if (i < n_body - 4) begin
        p.push_back(enc_jal(rd, 2));
      end else begin
        p.push_back(enc_lui(rd, int'($urandom_range(0, 262143))));
      end
      if (kind < 72) begin
        recent[2] = recent[1];
        recent[1] = recent[0];
        recent[0] = rd;
      end
    end
    for (int i = 1; i < 16; i++) p.push_back(enc_sw(i, 0, DUMP_BASE + 4 * i));
    p.push_back(enc_halt());
  endfunction
endpackage
