// tb_dmem: random stores to the 32-KByte data memory, read back through both the
// ME port and the inspection port; an unwritten word reads zero.
module tb_dmem;
  import rcmp_pkg::*;
  logic clk = 0, we = 0;
  word_t addr = 0, wdata = 0, rdata, dbg_addr = 0, dbg_data;
  word_t model [int];
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  dmem dut (.*);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int t = 0; t < 500; t++) begin
      int a;
      a = 4 * int'($urandom_range(1, 8191));
      @(negedge clk); we = 1; addr = a; wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    foreach (model[a]) begin
      addr = a; dbg_addr = a; #1; checks += 2;
      if (rdata !== model[a]) begin failures++; $display("port A [%h] = %h, expected %h", a, rdata, model[a]); end
      if (dbg_data !== model[a]) begin failures++; $display("port B [%h] = %h, expected %h", a, dbg_data, model[a]); end
    end
    dbg_addr = 0; #1; checks++;
    if (dbg_data !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
