// tb_ex_part: random operands through each of the three ALU sub-blocks; each must
// compute its own operations and return zero for the others.
module tb_ex_part;
  import rcmp_pkg::*;
  alu_op_e op;
  word_t a, b, y [3];
  int checks = 0, failures = 0;
  ex_part #(.PART(0)) p0 (.op, .a, .b, .y(y[0]));
  ex_part #(.PART(1)) p1 (.op, .a, .b, .y(y[1]));
  ex_part #(.PART(2)) p2 (.op, .a, .b, .y(y[2]));
  function automatic word_t expect_y(alu_op_e o, word_t x, word_t z);
    case (o)
      ALU_ADD: return x + z;        ALU_SUB: return x - z;
      ALU_SLT: return ($signed(x) < $signed(z)) ? 1 : 0;
      ALU_SLTU: return (x < z) ? 1 : 0;
      ALU_AND: return x & z;        ALU_OR: return x | z;
      ALU_XOR: return x ^ z;        ALU_PASSB: return z;
      ALU_SLL: return x << z[4:0];  ALU_SRL: return x >> z[4:0];
      default: return $signed(x) >>> z[4:0];
    endcase
  endfunction
  initial begin
    for (int t = 0; t < 3000; t++) begin
      int owner;
      op = alu_op_e'($urandom_range(0, 10));
      a = $urandom; b = (t % 4 == 0) ? a : $urandom;
      owner = (op <= ALU_SLTU) ? 0 : (op <= ALU_PASSB) ? 1 : 2;
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (y[p] !== ((p == owner) ? expect_y(op, a, b) : 32'd0)) begin
          failures++; $display("part %0d op %s a=%h b=%h y=%h", p, op.name(), a, b, y[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
