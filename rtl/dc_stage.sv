// dc_stage: decode SB. It holds the register file and the write-back logic: the
// separate WB stage of a five-stage RISC is removed, its wires become part of the
// interconnect (the `wb` input comes straight from ME over the sparing links) and
// its multiplexers live here.
//
// Each cycle the IF bundle is decoded, both source registers are read (a
// write-back arriving in the same cycle is seen), and the DC->EX bundle is
// registered. The stage does not look at the SIB; it only carries it on. The
// instruction encoding is defined in rcmp_pkg. Unknown opcodes decode as NOP.
module dc_stage
  import rcmp_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  if2dc_t in,
  input  wb_t    wb,
  output dc2ex_t out
);
  word_t  r1, r2;
  dc2ex_t d;

  regfile #(.N(NREG)) u_rf (
    .clk   (clk),
    .rst   (rst),
    .we    (wb.valid),
    .waddr (wb.rd),
    .wdata (wb.value),
    .raddr1(in.instr[21:18]),
    .raddr2(in.instr[17:14]),
    .rdata1(r1),
    .rdata2(r2)
  );

  always_comb begin
    logic [5:0] op;
    word_t      imm14, imm18;
    op    = in.instr[31:26];
    imm14 = {{18{in.instr[13]}}, in.instr[13:0]};
    imm18 = {{14{in.instr[17]}}, in.instr[17:0]};

    d          = '0;
    d.valid    = in.valid;
    d.sib      = in.sib;
    d.pc       = in.pc;
    d.rd       = in.instr[25:22];
    d.rs1      = in.instr[21:18];
    d.rs2      = in.instr[17:14];
    d.rs1_val  = r1;
    d.rs2_val  = r2;
    d.alu_op   = ALU_ADD;
    d.loc      = LOC_NONE;
    d.ctl      = CTL_NONE;
    d.br       = BR_EQ;

    case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA, OP_SLT, OP_SLTU: begin
        d.use_rs1 = 1'b1;
        d.use_rs2 = 1'b1;
        d.loc     = LOC_EX;
        case (op)
          OP_ADD:  d.alu_op = ALU_ADD;
          OP_SUB:  d.alu_op = ALU_SUB;
          OP_AND:  d.alu_op = ALU_AND;
          OP_OR:   d.alu_op = ALU_OR;
          OP_XOR:  d.alu_op = ALU_XOR;
          OP_SLL:  d.alu_op = ALU_SLL;
          OP_SRL:  d.alu_op = ALU_SRL;
          OP_SRA:  d.alu_op = ALU_SRA;
          OP_SLT:  d.alu_op = ALU_SLT;
          default: d.alu_op = ALU_SLTU;
        endcase
      end
      OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_SLLI, OP_SRLI, OP_SLTI: begin
        d.use_rs1 = 1'b1;
        d.b_imm   = 1'b1;
        d.imm     = imm14;
        d.loc     = LOC_EX;
        case (op)
          OP_ADDI: d.alu_op = ALU_ADD;
          OP_ANDI: d.alu_op = ALU_AND;
          OP_ORI:  d.alu_op = ALU_OR;
          OP_XORI: d.alu_op = ALU_XOR;
          OP_SLLI: d.alu_op = ALU_SLL;
          OP_SRLI: d.alu_op = ALU_SRL;
          default: d.alu_op = ALU_SLT;
        endcase
      end
      OP_LUI: begin
        d.b_imm  = 1'b1;
        d.imm    = {in.instr[17:0], 14'd0};
        d.alu_op = ALU_PASSB;
        d.loc    = LOC_EX;
      end
      OP_LW: begin
        d.use_rs1 = 1'b1;
        d.b_imm   = 1'b1;
        d.imm     = imm14;
        d.is_load = 1'b1;
        d.loc     = LOC_ME;
      end
      OP_SW: begin
        d.use_rs1  = 1'b1;
        d.use_rs2  = 1'b1;
        d.b_imm    = 1'b1;
        d.imm      = imm14;
        d.is_store = 1'b1;
      end
      OP_BEQ, OP_BNE, OP_BLT, OP_BGE: begin
        d.use_rs1 = 1'b1;
        d.use_rs2 = 1'b1;
        d.imm     = imm14 << 2;
        d.ctl     = CTL_BR;
        d.br      = br_e'(op[1:0]);
      end
      OP_JAL: begin
        d.imm = imm18 << 2;
        d.ctl = CTL_JAL;
        d.loc = LOC_EX;
      end
      OP_JALR: begin
        d.use_rs1 = 1'b1;
        d.imm     = imm14;
        d.ctl     = CTL_JALR;
        d.loc     = LOC_EX;
      end
      OP_HALT: d.ctl = CTL_HALT;
      default: ;
    endcase

    if (d.loc == LOC_NONE || d.rd == '0) begin
      d.loc = LOC_NONE;
      d.rd  = '0;
    end
    if (!d.use_rs1) d.rs1 = '0;
    if (!d.use_rs2) d.rs2 = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) out <= '0;
    else     out <= in.valid ? d : '0;
  end
endmodule
