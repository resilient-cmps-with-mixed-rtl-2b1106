// tb_regfile: random writes and reads of the 16-entry register file against a
// model; checks that r0 stays zero and that a same-cycle write is read through.
module tb_regfile;
  import rcmp_pkg::*;
  logic clk = 0, rst = 1, we;
  logic [3:0] waddr, ra1, ra2;
  word_t wdata, rd1, rd2;
  word_t model [16];
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  regfile dut (.clk, .rst, .we, .waddr, .wdata, .raddr1(ra1), .raddr2(ra2), .rdata1(rd1), .rdata2(rd2));
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    we = 0; waddr = 0; wdata = 0; ra1 = 0; ra2 = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 4'($urandom); wdata = $urandom; ra1 = 4'($urandom);
      ra2 = (t % 3 == 0) ? waddr : 4'($urandom);
      #1;
      checks += 2;
      if (rd1 !== ((ra1 == 0) ? 0 : (we && waddr == ra1) ? wdata : model[ra1])) begin failures++; $display("rd1 mismatch r%0d", ra1); end
      if (rd2 !== ((ra2 == 0) ? 0 : (we && waddr == ra2) ? wdata : model[ra2])) begin failures++; $display("rd2 mismatch r%0d", ra2); end
      @(posedge clk);
      if (we && waddr != 0) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
