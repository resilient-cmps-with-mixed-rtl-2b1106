// imem: the core's local instruction memory, 32 KByte (8192 words of 32 bits).
//
// Read is combinational on a word address taken from the byte PC (bits [1:0]
// ignored, upper bits beyond the size wrap). A write port loads the program; it
// is written at the clock edge. Contents are cleared to zero (a NOP) at time zero
// so that an unloaded memory reads defined values.
module imem
  import rcmp_pkg::*;
#(
  parameter int BYTES = 32768
) (
  input  logic  clk,
  input  logic  we,
  input  word_t waddr,   // byte address
  input  word_t wdata,
  input  word_t raddr,   // byte address
  output word_t rdata
);
  localparam int WORDS = BYTES / 4;
  localparam int AW    = $clog2(WORDS);

  word_t mem [WORDS];

  initial for (int i = 0; i < WORDS; i++) mem[i] = '0;

  always_ff @(posedge clk) if (we) mem[waddr[AW+1:2]] <= wdata;

  assign rdata = mem[raddr[AW+1:2]];
endmodule
