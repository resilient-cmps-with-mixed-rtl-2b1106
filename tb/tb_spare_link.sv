// tb_spare_link: drives random payloads on every source row and checks that the
// output is the selected row's payload delayed by exactly `hops` cycles, for
// every distance from 0 (direct) to MAXD, and that reset clears the registers.
module tb_spare_link;
  localparam int NSRC = 9, MAXD = 8;
  typedef logic [15:0] pl_t;
  logic clk = 0, rst = 1;
  pl_t src [NSRC], dout;
  logic [3:0] sel, hops;
  pl_t hist [$];
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  spare_link #(.NSRC(NSRC), .MAXD(MAXD), .T(pl_t)) dut (.*);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    foreach (src[i]) src[i] = '0;
    sel = 0; hops = 0;
    repeat (3) @(posedge clk);
    #1 checks++;
    for (int h = 1; h <= MAXD; h++) begin hops = 4'(h); #1; if (dout !== '0) failures++; end
    rst = 0;
    for (int h = 0; h <= MAXD; h++) begin
      sel  = 4'($urandom_range(0, NSRC - 1));
      hops = 4'(h);
      hist.delete();
      for (int t = 0; t < 40; t++) begin
        @(negedge clk);
        foreach (src[i]) src[i] = 16'($urandom);
        hist.push_front(src[sel]);
        #1;
        if (t >= h) begin
          checks++;
          if (dout !== hist[h]) begin failures++; $display("hops %0d t %0d: %h expected %h", h, t, dout, hist[h]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
