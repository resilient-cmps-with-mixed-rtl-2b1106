// ex_part: one of the three concurrent sub-blocks into which the ALU of the EX
// stage is split, so that the fine-grain fabric can stand in for one sub-block
// instead of the whole stage.
//
// PART 0 is the adder/comparator (ADD, SUB, SLT, SLTU), PART 1 the logic unit
// (AND, OR, XOR, pass-b), PART 2 the shifter (SLL, SRL, SRA). Which operations go
// to which sub-block is this design's choice; the split into three chunks of the
// ALU follows the processor description. Purely combinational; an operation that
// belongs to another sub-block yields zero.
module ex_part
  import rcmp_pkg::*;
#(
  parameter int PART = 0
) (
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);
  always_comb begin
    y = '0;
    case (PART)
      0: case (op)
           ALU_ADD:  y = a + b;
           ALU_SUB:  y = a - b;
           ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
           ALU_SLTU: y = {31'd0, a < b};
           default:  y = '0;
         endcase
      1: case (op)
           ALU_AND:   y = a & b;
           ALU_OR:    y = a | b;
           ALU_XOR:   y = a ^ b;
           ALU_PASSB: y = b;
           default:   y = '0;
         endcase
      default: case (op)
           ALU_SLL: y = a << b[4:0];
           ALU_SRL: y = a >> b[4:0];
           ALU_SRA: y = $signed(a) >>> b[4:0];
           default: y = '0;
         endcase
    endcase
  end
endmodule
