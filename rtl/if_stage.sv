// if_stage: instruction-fetch SB with the core's local instruction memory and the
// IF copy of the Instruction-Flow (InF) bit.
//
// Every cycle in which `run` is high the stage fetches one instruction and sends
// it on with its PC and a Stream-Identification Bit (SIB) equal to the InF bit.
// Fetch always predicts "not taken" (PC + 4, this design's choice). A redirect from
// EX (a taken branch, a jump, or the reload point after a flush) replaces the PC
// in the same cycle and toggles InF, so everything fetched from then on carries
// the new SIB; there is no other control input (no stall, no flush wire).
// Output is registered: one cycle from fetch address to the IF->DC bundle.
// The program is written through the prog_* port.
module if_stage
  import rcmp_pkg::*;
#(
  parameter int IMEM_BYTES = 32768
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   run,
  input  redir_t redir,
  output if2dc_t out,
  input  logic   prog_we,
  input  word_t  prog_addr,
  input  word_t  prog_data
);
  word_t pc;
  logic  inf;
  word_t fetch_pc;
  logic  fetch_sib;
  word_t instr;

  imem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk  (clk),
    .we   (prog_we),
    .waddr(prog_addr),
    .wdata(prog_data),
    .raddr(fetch_pc),
    .rdata(instr)
  );

  always_comb begin
    fetch_pc  = redir.valid ? redir.target : pc;
    fetch_sib = redir.valid ? !inf : inf;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc  <= '0;
      inf <= 1'b0;
      out <= '0;
    end else begin
      inf       <= fetch_sib;
      pc        <= run ? fetch_pc + 32'd4 : fetch_pc;
      out.valid <= run;
      out.sib   <= fetch_sib;
      out.pc    <= fetch_pc;
      out.instr <= instr;
    end
  end
endmodule
