// me_stage: memory SB with the core's local data memory and the ME bypass buffer.
//
// ME takes the EX->ME bundle and, in the same cycle, performs the load or store,
// pushes the instruction's result into its own bypass buffer and drives two
// outputs that the interconnect carries away: the write-back to the register file
// in DC, and, for loads, the forward of the loaded value (by sequence tag) into
// the EX bypass buffer. Both outputs are combinational; with no extra stages on
// the way they reach DC and EX at the next clock edge, and every row of distance
// adds a register. A store whose data is the result of a load that EX could not
// yet see arrives with sd_pend set and takes its data from the ME buffer, which
// always holds it because instructions reach ME in program order. Only the
// first lookup port of the shared bypass_buf is used here, and its location
// output is left unread: every entry ME pushes is already available.
module me_stage
  import rcmp_pkg::*;
#(
  parameter int DMEM_BYTES = 32768,
  parameter int BYP_DEPTH  = 15
) (
  input  logic      clk,
  input  logic      rst,
  input  ex2me_t    in,
  output wb_t       wb,
  output fwd_t      fwd,
  input  word_t     dbg_addr,
  output word_t     dbg_data,
  output me_stats_t stats
);
  word_t rdata, sdata, value;
  reg_t  q_reg [2];
  logic  q_hit [2];
  logic  q_avail [2];
  loc_e  q_loc [2];
  word_t q_value [2];
  logic  st_we;

  dmem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .we(st_we), .addr(in.result), .wdata(sdata), .rdata,
    .dbg_addr, .dbg_data
  );

  bypass_buf #(.DEPTH(BYP_DEPTH)) u_buf (
    .clk, .rst,
    .push(in.valid), .push_loc(in.loc), .push_rd(in.rd), .push_value(value),
    .push_avail(1'b1), .push_tag(in.tag),
    .fill_a(1'b0), .fill_a_tag('0), .fill_a_value('0),
    .fill_b(1'b0), .fill_b_tag('0), .fill_b_value('0),
    .q_reg, .q_hit, .q_avail, .q_loc, .q_value
  );

  always_comb begin
    q_reg[0] = in.sd_reg;
    q_reg[1] = '0;
    sdata    = in.sd_pend ? q_value[0] : in.sdata;
    st_we    = in.valid && in.is_store;
    value    = in.is_load ? rdata : in.result;

    wb       = '0;
    wb.valid = in.valid && in.loc != LOC_NONE && in.rd != '0;
    wb.rd    = in.rd;
    wb.value = value;

    fwd       = '0;
    fwd.valid = in.valid && in.is_load;
    fwd.tag   = in.tag;
    fwd.value = rdata;
  end

  always_ff @(posedge clk) begin
    if (rst) stats <= '0;
    else begin
      stats.loads     <= stats.loads     + 32'(in.valid && in.is_load);
      stats.stores    <= stats.stores    + 32'(st_we);
      stats.me_bypass <= stats.me_bypass + 32'(st_we && in.sd_pend);
    end
  end

  // a store's pending data must be in the ME buffer
  a_sd_hit: assert property (@(posedge clk) disable iff (rst)
                             in.valid && in.sd_pend |-> q_hit[0] && q_avail[0]);
endmodule
