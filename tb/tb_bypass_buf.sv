// tb_bypass_buf: pushes random entries (some unavailable) and fills them by tag,
// and checks both lookup ports against a queue model of the last DEPTH entries:
// the youngest entry writing the register wins, r0 and "nowhere" entries never
// match, entries older than DEPTH are gone.
module tb_bypass_buf;
  import rcmp_pkg::*;
  localparam int DEPTH = 15;
  typedef struct { loc_e loc; reg_t rd; word_t value; logic avail; tag_t tag; } ent_t;
  logic clk = 0, rst = 1;
  logic push = 0, push_avail = 0, fill_a = 0, fill_b = 0;
  loc_e push_loc = LOC_NONE;
  reg_t push_rd = 0;
  word_t push_value = 0, fill_a_value = 0, fill_b_value = 0;
  tag_t push_tag = 0, fill_a_tag = 0, fill_b_tag = 0;
  reg_t q_reg [2];
  logic q_hit [2], q_avail [2];
  loc_e q_loc [2];
  word_t q_value [2];
  ent_t model [$];
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  bypass_buf #(.DEPTH(DEPTH)) dut (.*);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    tag_t seq = 0;
    q_reg[0] = 0; q_reg[1] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // lookups against the model (state before this cycle's updates)
      for (int p = 0; p < 2; p++) begin
        bit hit; ent_t e;
        q_reg[p] = reg_t'($urandom_range(0, 5));
        #1;
        hit = 0;
        foreach (model[i]) if (!hit && model[i].loc != LOC_NONE && model[i].rd == q_reg[p] && q_reg[p] != 0) begin hit = 1; e = model[i]; end
        checks++;
        if (q_hit[p] !== hit || (hit && (q_avail[p] !== e.avail || q_loc[p] !== e.loc || (e.avail && q_value[p] !== e.value)))) begin
          failures++; $display("t=%0d port %0d r%0d: hit %0d/%0d", t, p, q_reg[p], q_hit[p], hit);
        end
      end
      push = 1'($urandom);
      push_loc = loc_e'($urandom_range(0, 2));
      push_rd = reg_t'($urandom_range(0, 5));
      push_value = $urandom;
      push_avail = 1'($urandom);
      push_tag = seq;
      fill_a = 0; fill_b = 0;
      if (model.size() > 0 && $urandom_range(0, 2) == 0) begin
        int i = int'($urandom_range(0, model.size() - 1));
        fill_a = 1; fill_a_tag = model[i].tag; fill_a_value = $urandom;
      end
      if (model.size() > 0 && $urandom_range(0, 2) == 0) begin
        int i = int'($urandom_range(0, model.size() - 1));
        fill_b = 1; fill_b_tag = model[i].tag; fill_b_value = $urandom;
      end
      @(posedge clk);
      foreach (model[i]) begin
        if (fill_a && !model[i].avail && model[i].tag == fill_a_tag) begin model[i].avail = 1; model[i].value = fill_a_value; end
        if (fill_b && !model[i].avail && model[i].tag == fill_b_tag) begin model[i].avail = 1; model[i].value = fill_b_value; end
      end
      if (push) begin
        model.push_front('{push_loc, push_rd, push_value, push_avail, push_tag});
        if (model.size() > DEPTH) void'(model.pop_back());
        seq++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
