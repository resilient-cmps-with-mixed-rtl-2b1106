// bypass_buf: FIFO of the most recent, not yet committed results, kept locally in
// the stage that consumes them (one in EX, one in ME).
//
// Every instruction that passes the stage pushes one entry, whether or not it
// writes a register, so the FIFO always covers the last DEPTH instructions. An
// entry holds the two location bits (produced in EX, in ME, or nowhere), the
// destination register and the value, plus an "available" bit and a sequence tag
// of this design's own: an entry whose value is produced later (a load, seen from
// EX, or an ALU result when EX is split in two) is pushed unavailable and filled
// by tag through one of two fill ports.
//
// Two lookup ports return the youngest entry that writes the given register (r0
// never matches). A hit that is not available tells the stage the value is not
// there yet (the stage then flushes and reloads). A miss means the register file
// value read in DC is current, provided the result loop of the core is no longer
// than DEPTH instructions. Lookups see the state before this cycle's push and
// fills. DEPTH defaults to 2N-1 for a cluster of N = 8 cores.
module bypass_buf
  import rcmp_pkg::*;
#(
  parameter int DEPTH = 15
) (
  input  logic  clk,
  input  logic  rst,
  // push
  input  logic  push,
  input  loc_e  push_loc,
  input  reg_t  push_rd,
  input  word_t push_value,
  input  logic  push_avail,
  input  tag_t  push_tag,
  // fills
  input  logic  fill_a,
  input  tag_t  fill_a_tag,
  input  word_t fill_a_value,
  input  logic  fill_b,
  input  tag_t  fill_b_tag,
  input  word_t fill_b_value,
  // lookups
  input  reg_t  q_reg [2],
  output logic  q_hit [2],
  output logic  q_avail [2],
  output loc_e  q_loc [2],
  output word_t q_value [2]
);
  typedef struct packed {
    logic  valid;
    loc_e  loc;
    reg_t  rd;
    word_t value;
    logic  avail;
    tag_t  tag;
  } entry_t;

  entry_t ent [DEPTH];   // ent[0] is the youngest

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) ent[i] <= '0;
    end else begin
      entry_t nxt [DEPTH];
      for (int i = 0; i < DEPTH; i++) begin
        nxt[i] = ent[i];
        if (fill_a && ent[i].valid && !ent[i].avail && ent[i].tag == fill_a_tag) begin
          nxt[i].value = fill_a_value;
          nxt[i].avail = 1'b1;
        end
        if (fill_b && ent[i].valid && !ent[i].avail && ent[i].tag == fill_b_tag) begin
          nxt[i].value = fill_b_value;
          nxt[i].avail = 1'b1;
        end
      end
      if (push) begin
        for (int i = DEPTH - 1; i > 0; i--) ent[i] <= nxt[i-1];
        ent[0] <= '{valid: 1'b1, loc: push_loc, rd: push_rd, value: push_value,
                    avail: push_avail, tag: push_tag};
      end else begin
        for (int i = 0; i < DEPTH; i++) ent[i] <= nxt[i];
      end
    end
  end

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      q_hit[p]   = 1'b0;
      q_avail[p] = 1'b0;
      q_loc[p]   = LOC_NONE;
      q_value[p] = '0;
      for (int i = DEPTH - 1; i >= 0; i--) begin   // youngest match wins
        if (ent[i].valid && ent[i].loc != LOC_NONE && ent[i].rd == q_reg[p] && q_reg[p] != '0) begin
          q_hit[p]   = 1'b1;
          q_avail[p] = ent[i].avail;
          q_loc[p]   = ent[i].loc;
          q_value[p] = ent[i].value;
        end
      end
    end
  end
endmodule
