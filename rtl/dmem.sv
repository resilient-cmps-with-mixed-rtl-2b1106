// dmem: the core's local data memory, 32 KByte (8192 words of 32 bits).
//
// Word-addressed from a byte address (bits [1:0] ignored, upper bits wrap). Only
// whole-word loads and stores exist (this design's choice). Port A is the ME
// stage's: combinational read, write at the clock edge. Port B is a second,
// read-only port for inspecting results from outside the core. Contents are
// cleared to zero at time zero.
module dmem
  import rcmp_pkg::*;
#(
  parameter int BYTES = 32768
) (
  input  logic  clk,
  input  logic  we,
  input  word_t addr,     // byte address, port A
  input  word_t wdata,
  output word_t rdata,
  input  word_t dbg_addr, // byte address, port B
  output word_t dbg_data
);
  localparam int WORDS = BYTES / 4;
  localparam int AW    = $clog2(WORDS);

  word_t mem [WORDS];

  initial for (int i = 0; i < WORDS; i++) mem[i] = '0;

  always_ff @(posedge clk) if (we) mem[addr[AW+1:2]] <= wdata;

  assign rdata    = mem[addr[AW+1:2]];
  assign dbg_data = mem[dbg_addr[AW+1:2]];
endmodule
