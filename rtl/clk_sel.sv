// clk_sel: glitch-free choice between the two clocks offered to every SB: the
// fast clock for components made only of coarse-grain parts, the slow one for a
// component that uses the fine-grain fabric.
//
// Classic two-flop handshake: each clock's enable is synchronised on that clock's
// falling edge and can only rise after the other enable has fallen, so the output
// never carries a truncated pulse. After a change of `slow` the output switches
// within about two cycles of each clock. The reset (asynchronous) selects the fast
// clock, so the logic behind it sees clock edges while it is held in reset. The
// synchroniser circuit is this design's own choice.
module clk_sel (
  input  logic clk_fast,
  input  logic clk_slow,
  input  logic rst,
  input  logic slow,
  output logic clk_out
);
  logic f1, f2, s1, s2;

  always_ff @(negedge clk_fast or posedge rst) begin
    if (rst) begin
      f1 <= 1'b1;
      f2 <= 1'b1;
    end else begin
      f1 <= !slow && !s2;
      f2 <= f1;
    end
  end

  always_ff @(negedge clk_slow or posedge rst) begin
    if (rst) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
    end else begin
      s1 <= slow && !f2;
      s2 <= s1;
    end
  end

  assign clk_out = (clk_fast && f2) || (clk_slow && s2);
endmodule
