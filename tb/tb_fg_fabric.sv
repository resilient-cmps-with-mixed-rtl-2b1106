// tb_fg_fabric: the fabric configured as an EX sub-block returns each of its
// operations one cycle later, for each of the three sub-blocks; configured as a
// DC stage it decodes and reads its own register file like a DC stage; while not
// configured as DC its DC outputs stay idle.
module tb_fg_fabric;
  import rcmp_pkg::*;
  import tb_isa_pkg::*;
  logic clk = 0, rst = 1, mode_dc = 0, mode_ex = 0;
  logic [1:0] part = 0;
  if2dc_t dc_in = '0;
  wb_t dc_wb = '0;
  dc2ex_t dc_out;
  aluop_t op = '0;
  word_t res;
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  fg_fabric dut (.*);
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    alu_op_e ops [3] = '{ALU_SUB, ALU_XOR, ALU_SRA};
    repeat (2) @(negedge clk);
    rst = 0;
    mode_ex = 1;
    for (int p = 0; p < 3; p++) begin
      part = 2'(p);
      for (int t = 0; t < 20; t++) begin
        word_t a, b, e;
        a = $urandom; b = $urandom;
        @(negedge clk);
        op = '{valid: 1, alu_op: ops[p], a: a, b: b};
        if (p == 0) e = a - b;
        else if (p == 1) e = a ^ b;
        else e = $signed(a) >>> b[4:0];
        @(negedge clk);
        op = '0;
        chk($sformatf("part %0d result", p), res == e);
      end
    end
    // DC configuration idle until selected
    @(negedge clk);
    dc_in = '{valid: 1, sib: 0, pc: 0, instr: enc_r(OP_ADD, 1, 2, 3)};
    @(negedge clk);
    chk("DC idle when not configured", !dc_out.valid);
    mode_dc = 1; mode_ex = 0; dc_in = '0;
    @(negedge clk);
    dc_wb = '{valid: 1, rd: 2, value: 32'h22};
    @(negedge clk);
    dc_wb = '{valid: 1, rd: 3, value: 32'h33};
    @(negedge clk);
    dc_wb = '0;
    dc_in = '{valid: 1, sib: 1, pc: 32'h44, instr: enc_r(OP_SLT, 1, 2, 3)};
    @(negedge clk);
    dc_in = '0;
    chk("DC decode in fabric", dc_out.valid && dc_out.sib && dc_out.pc == 32'h44 && dc_out.alu_op == ALU_SLT &&
                               dc_out.rs1_val == 32'h22 && dc_out.rs2_val == 32'h33 && dc_out.rd == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
