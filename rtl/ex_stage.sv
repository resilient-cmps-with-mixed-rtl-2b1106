// ex_stage: execute SB. It holds the EX copy of the Instruction-Flow (InF) bit,
// the EX bypass buffer, the three ALU sub-blocks and the branch logic, and it is
// the only place where instructions are ever discarded.
//
// EX1 (always present), for each incoming instruction:
//  * SIB check: an instruction whose SIB differs from InF belongs to a squashed
//    stream and is dropped without touching the bypass buffer.
//  * Operand lookup in the bypass buffer. A hit with the value present uses it; a
//    miss uses the register value read in DC. A hit whose value is not there yet
//    (a load still on its way from ME, or, in split mode, the result of the
//    instruction just ahead) cannot be served: instead of stalling, EX inverts
//    InF and redirects IF to this instruction's PC (flush and reload). A store
//    whose data is such a load result is let through and resolved in ME.
//  * Branches compare in EX1 with a comparator of their own; a taken branch or a
//    jump inverts InF and redirects IF to the target (fetch predicts not taken).
//  * Every executed instruction pushes one entry (location bits, rd, value) into
//    the buffer; load values are filled in later by the ME->EX forward.
// EX2 (split mode): the ALU is cut after the sub-blocks, so results appear one
// cycle later and are filled into the buffer from EX2. Split mode is turned on by
// `split` and always when one sub-block is served by the fine-grain fabric
// (fg_en/fg_part): the operands go out on fg_op and the registered result comes
// back on fg_res one cycle later.
// HALT stops the stage: from then on every instruction is dropped and `halted`
// stays high until reset.
// Output to ME is registered: 1 cycle through EX, 2 in split mode.
module ex_stage
  import rcmp_pkg::*;
#(
  parameter int BYP_DEPTH = 15
) (
  input  logic      clk,
  input  logic      rst,
  input  dc2ex_t    in,
  input  fwd_t      fwd,       // load value from ME
  input  logic      split,
  input  logic      fg_en,
  input  logic [1:0] fg_part,
  output aluop_t    fg_op,
  input  word_t     fg_res,
  output ex2me_t    out,
  output redir_t    redir,
  output logic      halted,
  output ex_stats_t stats
);
  logic  inf;
  tag_t  seq;
  logic  split_eff;

  // bypass buffer
  reg_t  q_reg [2];
  logic  q_hit [2];
  logic  q_avail [2];
  loc_e  q_loc [2];
  word_t q_value [2];
  logic  push, push_avail;
  word_t push_value;
  logic  fill_b;
  tag_t  fill_b_tag;
  word_t fill_b_value;

  bypass_buf #(.DEPTH(BYP_DEPTH)) u_buf (
    .clk, .rst,
    .push, .push_loc(in.loc), .push_rd(in.rd), .push_value, .push_avail, .push_tag(seq),
    .fill_a(fwd.valid), .fill_a_tag(fwd.tag), .fill_a_value(fwd.value),
    .fill_b, .fill_b_tag, .fill_b_value,
    .q_reg, .q_hit, .q_avail, .q_loc, .q_value
  );

  // ALU sub-blocks
  word_t part_y [NPART];
  word_t a, rs2v, b;
  for (genvar p = 0; p < NPART; p++) begin : g_part
    ex_part #(.PART(p)) u_part (.op(in.alu_op), .a(a), .b(b), .y(part_y[p]));
  end

  // EX2 pipeline register (split mode)
  typedef struct packed {
    logic    valid;
    ex2me_t  tok;
    logic    use_alu;
    logic [1:0] part;
    logic    from_fg;
    word_t   y0, y1, y2;
  } ex2_t;
  ex2_t p2;

  logic  accept, drop, conflict, sd_pend, taken, is_jump;
  logic  byp_a, byp_b;
  word_t target, alu_y, link_val, res1;
  logic [1:0] my_part;

  always_comb begin
    split_eff = split || fg_en;
    q_reg[0]  = in.rs1;
    q_reg[1]  = in.rs2;

    accept   = in.valid && !halted && in.sib == inf;
    drop     = in.valid && !accept;
    conflict = 1'b0;
    sd_pend  = 1'b0;
    byp_a    = 1'b0;
    byp_b    = 1'b0;

    a = in.rs1_val;
    if (in.use_rs1 && q_hit[0]) begin
      if (q_avail[0]) begin a = q_value[0]; byp_a = 1'b1; end
      else conflict = 1'b1;
    end
    rs2v = in.rs2_val;
    if (in.use_rs2 && q_hit[1]) begin
      if (q_avail[1]) begin rs2v = q_value[1]; byp_b = 1'b1; end
      else if (in.is_store && q_loc[1] == LOC_ME) sd_pend = 1'b1;
      else conflict = 1'b1;
    end
    b = in.b_imm ? in.imm : rs2v;

    my_part = 2'(part_of(in.alu_op));
    alu_y   = part_y[my_part];
    link_val = in.pc + 32'd4;
    is_jump  = in.ctl == CTL_JAL || in.ctl == CTL_JALR;
    res1     = is_jump ? link_val : alu_y;

    case (in.br)
      BR_EQ:   taken = a == rs2v;
      BR_NE:   taken = a != rs2v;
      BR_LT:   taken = $signed(a) < $signed(rs2v);
      default: taken = $signed(a) >= $signed(rs2v);
    endcase
    taken  = (in.ctl == CTL_BR && taken) || is_jump;
    target = (in.ctl == CTL_JALR) ? ((a + in.imm) & ~32'd3) : in.pc + in.imm;

    push       = accept && !conflict;
    // in split mode ALU results are only known in EX2; link values always in EX1
    push_avail = (in.loc == LOC_EX) && (!split_eff || is_jump);
    push_value = res1;

    redir = '0;
    if (accept && conflict) begin
      redir.valid  = 1'b1;
      redir.target = in.pc;
    end else if (push && taken) begin
      redir.valid  = 1'b1;
      redir.target = target;
    end

    fg_op        = '0;
    fg_op.valid  = push && fg_en && my_part == fg_part && !is_jump;
    fg_op.alu_op = in.alu_op;
    fg_op.a      = a;
    fg_op.b      = b;

    fill_b       = p2.valid && p2.tok.loc == LOC_EX && p2.use_alu;
    fill_b_tag   = p2.tok.tag;
    fill_b_value = p2.from_fg ? fg_res : (p2.part == 2'd0 ? p2.y0 : p2.part == 2'd1 ? p2.y1 : p2.y2);
  end

  ex2me_t tok1;
  always_comb begin
    tok1          = '0;
    tok1.valid    = push;
    tok1.tag      = seq;
    tok1.rd       = in.rd;
    tok1.loc      = in.loc;
    tok1.is_load  = in.is_load;
    tok1.is_store = in.is_store;
    tok1.result   = res1;
    tok1.sdata    = rs2v;
    tok1.sd_pend  = sd_pend;
    tok1.sd_reg   = in.rs2;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      inf    <= 1'b0;
      seq    <= '0;
      halted <= 1'b0;
      out    <= '0;
      p2     <= '0;
      stats  <= '0;
    end else begin
      if (redir.valid) inf <= !inf;
      if (push) seq <= seq + 1'b1;
      if (push && in.ctl == CTL_HALT) halted <= 1'b1;

      if (split_eff) begin
        p2.valid   <= push;
        p2.tok     <= tok1;
        p2.use_alu <= !is_jump;
        p2.part    <= my_part;
        p2.from_fg <= fg_op.valid;
        p2.y0      <= part_y[0];
        p2.y1      <= part_y[1];
        p2.y2      <= part_y[2];
        out        <= p2.tok;
        if (p2.valid && p2.use_alu) out.result <= fill_b_value;
        if (!p2.valid) out.valid <= 1'b0;
      end else begin
        p2  <= '0;
        out <= tok1;
      end

      stats.executed     <= stats.executed     + 32'(push);
      stats.dropped      <= stats.dropped      + 32'(drop);
      stats.flush_hazard <= stats.flush_hazard + 32'(accept && conflict);
      stats.flush_branch <= stats.flush_branch + 32'(push && taken);
      stats.ex_bypass    <= stats.ex_bypass    + 32'(push && byp_a) + 32'(push && byp_b);
      stats.ex_fills     <= stats.ex_fills     + 32'(fwd.valid);
      stats.fg_ops       <= stats.fg_ops       + 32'(fg_op.valid);
      stats.split_ops    <= stats.split_ops    + 32'(push && split_eff);
    end
  end
endmodule
