// tb_if_stage: loads a program, lets the stage fetch, and checks the PC sequence
// (PC+4 each cycle, one cycle from fetch to output), the instruction words, and
// that each redirect jumps to the target and toggles the SIB of everything that
// follows.
module tb_if_stage;
  import rcmp_pkg::*;
  logic clk = 0, rst = 1, run = 0, prog_we = 0;
  redir_t redir = '0;
  if2dc_t out;
  word_t prog_addr = 0, prog_data = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  if_stage dut (.*);
  function automatic word_t word_at(word_t a); return a * 32'h9e3779b1 + 7; endfunction
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    word_t exp_pc;
    logic exp_sib;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 4 * i; prog_data = word_at(4 * i);
    end
    @(negedge clk); prog_we = 0; rst = 0;
    @(negedge clk); checks++;
    if (out.valid) begin failures++; $display("valid while not running"); end
    run = 1;
    exp_pc = 0; exp_sib = 0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      checks++;
      if (!out.valid || out.pc !== exp_pc || out.sib !== exp_sib || out.instr !== word_at(exp_pc)) begin
        failures++; $display("t=%0d pc %h/%h sib %0d/%0d", t, out.pc, exp_pc, out.sib, exp_sib);
      end
      if (t % 17 == 5) begin
        redir.valid = 1; redir.target = 4 * $urandom_range(0, 200);
        exp_pc = redir.target; exp_sib = !exp_sib;
      end else begin
        redir = '0;
        exp_pc += 4;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
