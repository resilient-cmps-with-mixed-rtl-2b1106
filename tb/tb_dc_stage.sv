// tb_dc_stage: writes registers through the write-back input, then decodes one
// instruction of every class and checks the DC->EX bundle one cycle later: ALU
// operation, immediate, registers and their values, result location, control.
module tb_dc_stage;
  import rcmp_pkg::*;
  import tb_isa_pkg::*;
  logic clk = 0, rst = 1;
  if2dc_t in = '0;
  wb_t wb = '0;
  dc2ex_t out;
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  dc_stage dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic dec(word_t ins);
    @(negedge clk);
    in = '{valid: 1, sib: 1, pc: 32'h40, instr: ins};
    @(negedge clk);
    in = '0;
  endtask
  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 1; i < 16; i++) begin
      @(negedge clk); wb = '{valid: 1, rd: reg_t'(i), value: 32'h100 * i};
    end
    @(negedge clk); wb = '0;
    dec(enc_r(OP_SUB, 3, 4, 5));
    chk("sub", out.valid && out.sib && out.alu_op == ALU_SUB && out.rd == 3 && out.rs1_val == 32'h400 &&
               out.rs2_val == 32'h500 && out.use_rs1 && out.use_rs2 && !out.b_imm && out.loc == LOC_EX);
    dec(enc_i(OP_ADDI, 7, 2, -3));
    chk("addi", out.alu_op == ALU_ADD && out.b_imm && out.imm == -32'sd3 && out.rs1_val == 32'h200 && !out.use_rs2);
    dec(enc_i(OP_LW, 9, 1, 16));
    chk("lw", out.is_load && out.loc == LOC_ME && out.rd == 9 && out.imm == 16);
    dec(enc_sw(6, 1, 8));
    chk("sw", out.is_store && out.loc == LOC_NONE && out.rd == 0 && out.rs2 == 6 && out.rs2_val == 32'h600);
    dec(enc_b(OP_BLT, 1, 2, -2));
    chk("blt", out.ctl == CTL_BR && out.br == BR_LT && out.imm == -32'sd8 && out.loc == LOC_NONE);
    dec(enc_lui(5, 3));
    chk("lui", out.alu_op == ALU_PASSB && out.imm == 32'h0000c000 && out.rd == 5);
    dec(enc_jal(15, 4));
    chk("jal", out.ctl == CTL_JAL && out.imm == 16 && out.rd == 15 && out.loc == LOC_EX);
    dec(enc_r(OP_ADD, 0, 1, 2));
    chk("write to r0 is nowhere", out.loc == LOC_NONE);
    dec(enc_halt());
    chk("halt", out.ctl == CTL_HALT);
    // write-back in the same cycle as the read
    @(negedge clk);
    in = '{valid: 1, sib: 0, pc: 0, instr: enc_r(OP_OR, 1, 8, 8)};
    wb = '{valid: 1, rd: 8, value: 32'hdead};
    @(negedge clk);
    in = '0; wb = '0;
    chk("write-back seen in same cycle", out.rs1_val == 32'hdead && out.rs2_val == 32'hdead && !out.sib);
    @(negedge clk);
    chk("bubble", !out.valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
