// spare_link: one input of a substitutable block (SB) in the reconfigurable,
// pipelined sparing interconnect.
//
// The SB may take this input from the same kind of SB in any of NSRC rows of the
// component array. The source row is chosen by `sel`; because the wire then spans
// `hops` rows, it passes through `hops` registers (one per row crossed), which
// turns the long wire into extra pipeline stages instead of a longer cycle.
// hops = 0 is the direct, unregistered connection inside a component.
// The interconnect is described as bidirectional wires with tri-state switches;
// here it is written as a multiplexer followed by a register chain, which has the
// same cycle behaviour. The payload type carries its own valid bit; reset clears
// the registers. `sel` and `hops` are meant to change only while the core is held
// in reset.
module spare_link #(
  parameter int  NSRC = 9,
  parameter int  MAXD = 8,
  parameter type T    = logic [31:0]
) (
  input  logic                        clk,
  input  logic                        rst,
  input  T                            src [NSRC],
  input  logic [$clog2(NSRC)-1:0]     sel,
  input  logic [$clog2(MAXD+1)-1:0]   hops,
  output T                            dout
);
  T picked;
  T stage [1:MAXD];   // stage[k]: the payload after k registers

  assign picked = src[sel];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 1; k <= MAXD; k++) stage[k] <= '0;
    end else begin
      stage[1] <= picked;
      for (int k = 2; k <= MAXD; k++) stage[k] <= stage[k-1];
    end
  end
  always_comb begin
    dout = picked;
    for (int k = 1; k <= MAXD; k++) if (int'(hops) == k) dout = stage[k];
  end
endmodule
