// tb_imem: writes random words at random addresses of the 32-KByte instruction
// memory and reads them back, including the first and last words.
module tb_imem;
  import rcmp_pkg::*;
  logic clk = 0, we = 0;
  word_t waddr = 0, wdata = 0, raddr = 0, rdata;
  word_t model [int];
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  imem dut (.*);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int t = 0; t < 500; t++) begin
      int a;
      a = (t == 0) ? 0 : (t == 1) ? 32764 : 4 * int'($urandom_range(0, 8191));
      @(negedge clk); we = 1; waddr = a; wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    foreach (model[a]) begin
      raddr = a; #1; checks++;
      if (rdata !== model[a]) begin failures++; $display("imem[%h] = %h, expected %h", a, rdata, model[a]); end
    end
    raddr = 32768; #1; checks++;     // wraps to word 0
    if (rdata !== model[0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
