// fg_fabric: behavioural model of the shared fine-grain (FPGA-like) reconfigurable
// block that sits at the top of the component array and can stand in for a
// damaged SB that has no usable identical spare.
//
// A real fabric is a LUT/routing substrate loaded with a bitstream; this model
// represents only what the fabric does once configured. Two configurations are
// modelled, the two the processor evaluation uses: a whole DC stage (mode_dc), and
// one of the three EX sub-blocks (mode_ex, part selected by `part`). The DC
// configuration behaves exactly like dc_stage. The EX sub-block configuration
// receives the operands of one ALU operation per cycle on `op` and returns the
// result registered, one cycle later, on `res`; this is the internal pipeline
// register that makes the EX stage run split in two stages while a sub-block is
// in the fabric. The lower clock rate of fabric logic is not modelled here: the
// core that uses the fabric is switched to the slow clock outside. IF and ME are
// not offered because they contain the 32-KByte local memories.
module fg_fabric
  import rcmp_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       mode_dc,
  input  logic       mode_ex,
  input  logic [1:0] part,
  // DC configuration
  input  if2dc_t     dc_in,
  input  wb_t        dc_wb,
  output dc2ex_t     dc_out,
  // EX sub-block configuration
  input  aluop_t     op,
  output word_t      res
);
  word_t y [NPART];

  dc_stage u_dc (.clk, .rst(rst || !mode_dc), .in(dc_in), .wb(dc_wb), .out(dc_out));

  for (genvar p = 0; p < NPART; p++) begin : g_part
    ex_part #(.PART(p)) u_part (.op(op.alu_op), .a(op.a), .b(op.b), .y(y[p]));
  end

  always_ff @(posedge clk) begin
    if (rst || !mode_ex) res <= '0;
    else if (op.valid)   res <= (part == 2'd0) ? y[0] : (part == 2'd1) ? y[1] : y[2];
  end
endmodule
