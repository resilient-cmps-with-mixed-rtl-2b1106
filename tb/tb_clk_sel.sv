// tb_clk_sel: switches between a 10-unit and a 22-unit clock several times and
// checks that the output never has a high or low phase shorter than the fast
// clock's half period (no glitch), that it settles to the selected clock's period
// within a few cycles, and that reset selects the fast clock.
module tb_clk_sel;
  logic clk_fast = 0, clk_slow = 0, rst = 0, slow = 0, clk_out;
  initial #1 rst = 1;   // a rising edge applies the asynchronous reset
  realtime last_edge = 0, min_phase = 1e9;
  realtime rises [$];
  int checks = 0, failures = 0;
  always #5  clk_fast = !clk_fast;
  always #11 clk_slow = !clk_slow;
  clk_sel dut (.*);
  always @(clk_out) begin
    if ($realtime - last_edge < min_phase && last_edge > 0) min_phase = $realtime - last_edge;
    last_edge = $realtime;
    if (clk_out) rises.push_back($realtime);
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic check_period(realtime p, string what);
    rises.delete();
    #300;
    checks++;
    if (rises.size() < 3 || rises[$] - rises[$-1] != p) begin
      failures++; $display("%s: period %0t, expected %0t", what, rises.size() > 1 ? rises[$] - rises[$-1] : 0, p);
    end
  endtask
  initial begin
    #53 check_period(10, "in reset");
    rst = 0;
    check_period(10, "fast");
    for (int i = 0; i < 6; i++) begin
      #($urandom_range(0, 30));
      slow = !slow;
      check_period(slow ? 22 : 10, slow ? "slow" : "fast");
    end
    checks++;
    if (min_phase < 5) begin failures++; $display("glitch: phase of %0t", min_phase); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
