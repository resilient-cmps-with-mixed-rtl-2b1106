// tb_me_stage: stores and loads through the memory stage: write-back and ME->EX
// forward of a load in the same cycle, write-back of an EX result, a store whose
// data comes from the ME bypass buffer (sd_pend), and the memory contents seen
// through the inspection port.
module tb_me_stage;
  import rcmp_pkg::*;
  logic clk = 0, rst = 1;
  ex2me_t in = '0;
  wb_t wb;
  fwd_t fwd;
  word_t dbg_addr = 0, dbg_data;
  me_stats_t stats;
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  me_stage #(.DMEM_BYTES(4096), .BYP_DEPTH(15)) dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic ex2me_t st(word_t addr, word_t data);
    ex2me_t t = '0;
    t.valid = 1; t.is_store = 1; t.result = addr; t.sdata = data; t.loc = LOC_NONE;
    return t;
  endfunction
  function automatic ex2me_t ld(int rd, word_t addr, int tag);
    ex2me_t t = '0;
    t.valid = 1; t.is_load = 1; t.result = addr; t.rd = reg_t'(rd); t.loc = LOC_ME; t.tag = tag_t'(tag);
    return t;
  endfunction
  initial begin
    ex2me_t t;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk); in = st('h40, 32'hcafe0001); #1;
    chk("store writes nothing back", !wb.valid && !fwd.valid);
    @(negedge clk); in = ld(5, 'h40, 9); #1;
    chk("load write-back", wb.valid && wb.rd == 5 && wb.value == 32'hcafe0001);
    chk("load forward", fwd.valid && fwd.tag == 9 && fwd.value == 32'hcafe0001);
    @(negedge clk);
    t = '0; t.valid = 1; t.rd = 7; t.loc = LOC_EX; t.result = 77;
    in = t; #1;
    chk("ALU result written back, not forwarded", wb.valid && wb.rd == 7 && wb.value == 77 && !fwd.valid);
    @(negedge clk);
    t = st('h80, 0); t.sd_pend = 1; t.sd_reg = 5;   // data = r5, the load above
    in = t;
    @(negedge clk); in = '0;
    dbg_addr = 'h80; #1;
    chk("store data from ME buffer", dbg_data == 32'hcafe0001);
    chk("counters", stats.loads == 1 && stats.stores == 2 && stats.me_bypass == 1);
    @(negedge clk);
    t = '0; t.valid = 1; t.rd = 0; t.loc = LOC_NONE; in = t; #1;
    chk("nothing written back for no-result instruction", !wb.valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
