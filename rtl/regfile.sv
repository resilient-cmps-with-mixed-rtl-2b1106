// regfile: the 16-entry, 32-bit register file held in the DC stage.
//
// Two combinational read ports and one write port. r0 always reads zero (this
// design's choice). A write and a read of the same register in the same cycle
// return the new value, so the write-back that arrives over the interconnect is
// visible to the instruction being decoded in that cycle; this is the "few
// multiplexers" of write-back that live in DC. Writes take effect at the clock edge.
module regfile
  import rcmp_pkg::*;
#(
  parameter int N = NREG
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] waddr,
  input  word_t                wdata,
  input  logic [$clog2(N)-1:0] raddr1,
  input  logic [$clog2(N)-1:0] raddr2,
  output word_t                rdata1,
  output word_t                rdata2
);
  word_t regs [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    rdata1 = (raddr1 == '0) ? '0 : (we && waddr == raddr1) ? wdata : regs[raddr1];
    rdata2 = (raddr2 == '0) ? '0 : (we && waddr == raddr2) ? wdata : regs[raddr2];
  end
endmodule
