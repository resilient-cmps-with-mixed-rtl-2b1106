// tb_ex_stage: directed test of the execute stage: an ALU result, EX bypassing, a
// load-use conflict that flushes and reloads (redirect to the instruction's own
// PC, InF toggled, stale-SIB instructions dropped, a second flush when the
// reloaded instruction still finds the value missing), the ME->EX forward fill, a
// store whose data is left to ME, taken and not-taken branches, split mode (two
// cycles through EX, back-to-back dependence flushes), a sub-block served by the
// fabric, and HALT. Latencies: 1 cycle to ME, 2 in split mode.
module tb_ex_stage;
  import rcmp_pkg::*;
  logic clk = 0, rst = 1, split = 0, fg_en = 0, halted;
  logic [1:0] fg_part = 0;
  dc2ex_t in = '0;
  fwd_t fwd = '0;
  aluop_t fg_op;
  word_t fg_res = 0;
  ex2me_t out;
  redir_t redir;
  ex_stats_t stats;
  int checks = 0, failures = 0;
  logic sib = 0;
  always #5 clk = !clk;
  ex_stage #(.BYP_DEPTH(15)) dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic dc2ex_t alu(alu_op_e op, int rd, int rs1, int rs2, word_t v1, word_t v2, word_t pc);
    dc2ex_t d = '0;
    d.valid = 1; d.sib = sib; d.pc = pc; d.alu_op = op; d.rd = reg_t'(rd);
    d.rs1 = reg_t'(rs1); d.rs2 = reg_t'(rs2); d.use_rs1 = 1; d.use_rs2 = 1;
    d.rs1_val = v1; d.rs2_val = v2; d.loc = LOC_EX;
    return d;
  endfunction
  // drive one instruction for one cycle; outputs of that cycle are sampled by the caller
  task automatic drive(dc2ex_t d);
    @(negedge clk);
    in = d;
    #1;
  endtask

  initial begin
    dc2ex_t d;
    tag_t ld_tag;
    repeat (2) @(negedge clk);
    rst = 0;
    // 1. plain ALU
    drive(alu(ALU_ADD, 1, 0, 0, 2, 3, 'h10));
    chk("no redirect", !redir.valid);
    drive('0);
    chk("add result after 1 cycle", out.valid && out.result == 5 && out.rd == 1 && out.loc == LOC_EX);
    // 2. bypass from EX buffer (register values in the bundle are stale)
    drive(alu(ALU_ADD, 2, 1, 1, 0, 0, 'h14));
    drive('0);
    chk("bypassed add", out.result == 10 && stats.ex_bypass == 2);
    // 3. load then use: flush and reload
    d = alu(ALU_ADD, 3, 1, 0, 0, 0, 'h18); d.b_imm = 1; d.imm = 'h100; d.is_load = 1; d.loc = LOC_ME; d.use_rs2 = 0;
    drive(d);
    drive(alu(ALU_ADD, 4, 3, 1, 0, 0, 'h1c));
    chk("load address", out.valid && out.is_load && out.result == 'h105);
    ld_tag = out.tag;
    chk("conflict redirects to own pc", redir.valid && redir.target == 'h1c);
    drive(alu(ALU_SUB, 5, 1, 1, 0, 0, 'h20));   // old stream: must be dropped
    chk("flushed instruction not executed", !out.valid && !redir.valid);
    sib = !sib;
    drive(alu(ALU_ADD, 4, 3, 1, 0, 0, 'h1c));  // reloaded before the load value is back
    chk("conflict detected again: flushed once more", redir.valid && redir.target == 'h1c);
    @(negedge clk);
    in = '0;
    fwd = '{valid: 1, tag: ld_tag, value: 100};
    @(negedge clk);
    fwd = '0;
    sib = !sib;
    drive(alu(ALU_ADD, 4, 3, 1, 0, 0, 'h1c));  // reloaded
    chk("reloaded instruction runs", !redir.valid);
    drive('0);
    chk("reload uses forwarded load value", out.valid && out.result == 105);
    chk("counters", stats.flush_hazard == 2 && stats.dropped == 1 && stats.ex_fills == 1);
    // 4. store whose data is a pending load: passed to ME
    d = alu(ALU_ADD, 6, 0, 0, 0, 0, 'h24); d.b_imm = 1; d.imm = 'h200; d.is_load = 1; d.loc = LOC_ME; d.use_rs2 = 0;
    drive(d);
    d = alu(ALU_ADD, 0, 0, 6, 0, 0, 'h28); d.b_imm = 1; d.imm = 'h300; d.is_store = 1; d.loc = LOC_NONE; d.rd = 0;
    drive(d);
    chk("store not flushed", !redir.valid);
    drive('0);
    chk("store data pending for ME", out.valid && out.is_store && out.sd_pend && out.sd_reg == 6 && out.result == 'h300);
    // 5. branches
    d = alu(ALU_ADD, 0, 1, 2, 0, 0, 'h40); d.ctl = CTL_BR; d.br = BR_NE; d.imm = -8; d.loc = LOC_NONE; d.rd = 0;
    drive(d);
    chk("taken branch", redir.valid && redir.target == 'h38);
    sib = !sib;
    d = alu(ALU_ADD, 0, 1, 1, 0, 0, 'h44); d.ctl = CTL_BR; d.br = BR_NE; d.imm = 64; d.loc = LOC_NONE; d.rd = 0;
    drive(d);
    chk("not-taken branch", !redir.valid && stats.flush_branch == 1);
    d = alu(ALU_ADD, 7, 0, 0, 0, 0, 'h48); d.ctl = CTL_JAL; d.imm = 'h20; d.use_rs1 = 0; d.use_rs2 = 0;
    drive(d);
    chk("jal", redir.valid && redir.target == 'h68);
    sib = !sib;
    drive('0);
    chk("jal link", out.result == 'h4c && out.rd == 7);
    // 6. split mode
    split = 1;
    drive(alu(ALU_OR, 8, 1, 2, 0, 0, 'h80));
    drive(alu(ALU_AND, 9, 8, 1, 0, 0, 'h84));
    chk("back-to-back dependence in split mode flushes", redir.valid && redir.target == 'h84);
    chk("split: nothing out after 1 cycle", !out.valid);
    sib = !sib;
    drive('0);
    chk("split: result after 2 cycles", out.valid && out.result == (5 | 10) && out.rd == 8);
    drive(alu(ALU_AND, 9, 8, 1, 0, 0, 'h84));
    chk("dependence one instruction apart is served", !redir.valid);
    drive('0);
    drive('0);
    chk("split and", out.valid && out.result == (15 & 5));
    // 7. logic sub-block in the fabric
    fg_en = 1; fg_part = 1;
    drive(alu(ALU_XOR, 10, 1, 2, 0, 0, 'h88));
    chk("operation sent to the fabric", fg_op.valid && fg_op.alu_op == ALU_XOR && fg_op.a == 5 && fg_op.b == 10);
    @(negedge clk);
    in = '0;
    fg_res = 32'h1234;   // the fabric's registered result
    #1;
    @(negedge clk);
    chk("result taken from the fabric", out.valid && out.result == 32'h1234 && stats.fg_ops == 1);
    fg_en = 0; split = 0;
    // 8. halt
    d = '0; d.valid = 1; d.sib = sib; d.ctl = CTL_HALT; d.pc = 'h90;
    drive(d);
    drive(alu(ALU_ADD, 11, 1, 1, 0, 0, 'h94));
    chk("halted", halted);
    drive('0);
    chk("nothing after halt", !out.valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
