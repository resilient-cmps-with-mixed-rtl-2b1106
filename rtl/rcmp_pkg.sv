// rcmp_pkg: types and constants shared by the substitutable blocks (SBs) of the
// adaptive processor and by the component array.
//
// The processor is a 32-bit in-order RISC with a 16-entry register file, cut into
// four decoupled stages (IF, DC, EX, ME); write-back is folded into the interconnect
// and the DC stage. Every stage-to-stage bundle below is a struct that carries its
// own valid bit, so the reconfigurable interconnect can delay any of them through
// plain registers without knowing what it carries.
//
// The instruction set is this design's own (the processor is only described as a
// "typical 32-bit in-order RISC"):
//   [31:26] opcode  [25:22] rd  [21:18] rs1  [17:14] rs2  [13:0] imm14 (signed)
//   LUI and JAL use [17:0] as an 18-bit immediate. Register r0 reads as zero.
//   Branch and jump offsets count words and are relative to the instruction's PC.
package rcmp_pkg;

  localparam int XLEN = 32;
  localparam int NREG = 16;
  localparam int RW   = 4;     // register-number width
  localparam int TAGW = 6;     // sequence tag width of bypass-buffer entries

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RW-1:0]   reg_t;
  typedef logic [TAGW-1:0] tag_t;

  // opcodes
  localparam logic [5:0] OP_NOP  = 6'd0,  OP_ADD  = 6'd1,  OP_SUB  = 6'd2,  OP_AND  = 6'd3,
                         OP_OR   = 6'd4,  OP_XOR  = 6'd5,  OP_SLL  = 6'd6,  OP_SRL  = 6'd7,
                         OP_SRA  = 6'd8,  OP_SLT  = 6'd9,  OP_SLTU = 6'd10,
                         OP_ADDI = 6'd16, OP_ANDI = 6'd17, OP_ORI  = 6'd18, OP_XORI = 6'd19,
                         OP_SLLI = 6'd20, OP_SRLI = 6'd21, OP_SLTI = 6'd22, OP_LUI  = 6'd23,
                         OP_LW   = 6'd32, OP_SW   = 6'd33,
                         OP_BEQ  = 6'd40, OP_BNE  = 6'd41, OP_BLT  = 6'd42, OP_BGE  = 6'd43,
                         OP_JAL  = 6'd44, OP_JALR = 6'd45, OP_HALT = 6'd63;

  // ALU operations; each belongs to one of the three EX sub-blocks
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLT, ALU_SLTU,   // sub-block 0: adder / comparator
    ALU_AND, ALU_OR, ALU_XOR, ALU_PASSB,   // sub-block 1: logic unit
    ALU_SLL, ALU_SRL, ALU_SRA              // sub-block 2: shifter
  } alu_op_e;

  localparam int NPART = 3;

  // where an instruction produces its result: the two location bits of a bypass entry
  typedef enum logic [1:0] {LOC_NONE = 2'd0, LOC_EX = 2'd1, LOC_ME = 2'd2} loc_e;

  typedef enum logic [2:0] {CTL_NONE, CTL_BR, CTL_JAL, CTL_JALR, CTL_HALT} ctl_e;
  typedef enum logic [1:0] {BR_EQ, BR_NE, BR_LT, BR_GE} br_e;

  // IF -> DC
  typedef struct packed {
    logic  valid;
    logic  sib;      // stream-identification bit
    word_t pc;
    word_t instr;
  } if2dc_t;

  // DC -> EX
  typedef struct packed {
    logic    valid;
    logic    sib;
    word_t   pc;
    alu_op_e alu_op;
    logic    b_imm;    // operand b is the immediate
    word_t   imm;
    reg_t    rd;
    reg_t    rs1;
    reg_t    rs2;
    logic    use_rs1;
    logic    use_rs2;
    word_t   rs1_val;  // register-file values read in DC
    word_t   rs2_val;
    loc_e    loc;
    logic    is_load;
    logic    is_store;
    ctl_e    ctl;
    br_e     br;
  } dc2ex_t;

  // EX -> ME
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    reg_t  rd;
    loc_e  loc;
    logic  is_load;
    logic  is_store;
    word_t result;   // ALU result, or the address of a load/store
    word_t sdata;    // store data
    logic  sd_pend;  // store data is a load result still to be taken from the ME buffer
    reg_t  sd_reg;
  } ex2me_t;

  // ME -> DC: write-back carried by the interconnect
  typedef struct packed {
    logic  valid;
    reg_t  rd;
    word_t value;
  } wb_t;

  // ME -> EX: load value forwarded into the EX bypass buffer
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    word_t value;
  } fwd_t;

  // EX -> IF: redirect (branch target or reload point)
  typedef struct packed {
    logic  valid;
    word_t target;
  } redir_t;

  // EX -> fine-grain sub-block: operands of one ALU operation
  typedef struct packed {
    logic    valid;
    alu_op_e alu_op;
    word_t   a;
    word_t   b;
  } aluop_t;

  // event counters of one core, for observing the mechanisms at work
  typedef struct packed {
    logic [31:0] executed;      // instructions that passed the SIB check and executed in EX
    logic [31:0] dropped;       // instructions discarded in EX because their SIB did not match InF
    logic [31:0] flush_hazard;  // flush-and-reload because an operand was not yet available
    logic [31:0] flush_branch;  // flushes for taken branches and jumps
    logic [31:0] ex_bypass;     // operands taken from the EX bypass buffer
    logic [31:0] ex_fills;      // load values forwarded from ME into the EX buffer
    logic [31:0] fg_ops;        // ALU operations executed by the fine-grain sub-block
    logic [31:0] split_ops;     // instructions executed with EX split in two stages
  } ex_stats_t;

  typedef struct packed {
    logic [31:0] loads;
    logic [31:0] stores;
    logic [31:0] me_bypass;     // store data taken from the ME bypass buffer
  } me_stats_t;

  function automatic int unsigned part_of(alu_op_e op);
    case (op)
      ALU_ADD, ALU_SUB, ALU_SLT, ALU_SLTU: return 0;
      ALU_AND, ALU_OR, ALU_XOR, ALU_PASSB: return 1;
      default:                             return 2;
    endcase
  endfunction

endpackage
