// rcmp_cmp: a cluster of N adaptive cores built on the mixed-grain reconfigurable
// substrate (the design's top level).
//
// The array has one row per core and one column per substitutable block (SB):
// IF, DC, EX, ME. Row N of the DC column, and the EX sub-block slot, is the
// shared fine-grain fabric (fg_fabric), placed "above" row 0. A logical core k
// is assembled from any IF, DC, EX and ME rows given by row_if/row_dc/row_ex/
// row_me[k] (row N in row_dc[k] means the DC stage runs in the fabric). Every
// SB input is a spare_link that selects the source row and adds one register per
// row crossed, so a core built from distant rows has extra pipeline stages but
// the same cycle time. The processor tolerates this because its stages are
// decoupled: the SIB/InF flush, the bypass buffers and flush-and-reload need no
// global signal. A core can instead have one EX sub-block served by the fabric
// (fg_ex[k], fg_part[k]); its EX then runs split in two stages. split[k] forces
// the two-stage EX without the fabric.
//
// Each SB has a clk_sel choosing the fast or the slow clock; slow[k] moves all SBs
// of core k to clk_slow (required when the core uses the fabric, which is always
// clocked by clk_slow). Unused SBs are held in reset. The configuration is meant
// to be changed only while `rst` is high. cfg_ok[k] reports whether core k's
// configuration is legal: its rows are in range and not shared with another core,
// at most one core uses the fabric, a core using it is slow, and its result loop
// (DC->EX->ME->DC, in instructions) fits in the BYP_DEPTH-entry bypass buffers.
// Choosing the configuration (the greedy algorithm that maps healthy SBs to cores)
// is left to software outside this block.
//
// Observation: halted[k], per-core event counters, and a read port into core k's
// data memory (dbg_addr/dbg_data). Programs are written into the instruction
// memory of physical IF row r with prog_we[r].
module rcmp_cmp
  import rcmp_pkg::*;
#(
  parameter int N_CORES    = 8,
  parameter int IMEM_BYTES = 32768,
  parameter int DMEM_BYTES = 32768,
  parameter int BYP_DEPTH  = 2 * N_CORES - 1,
  localparam int N         = N_CORES,
  localparam int RIW       = $clog2(N_CORES + 1),
  localparam int MAXD      = N_CORES
) (
  input  logic            clk_fast,
  input  logic            clk_slow,
  input  logic            rst,
  // configuration of logical core k
  input  logic            en      [N],
  input  logic [RIW-1:0]  row_if  [N],
  input  logic [RIW-1:0]  row_dc  [N],
  input  logic [RIW-1:0]  row_ex  [N],
  input  logic [RIW-1:0]  row_me  [N],
  input  logic            split   [N],
  input  logic            slow    [N],
  input  logic            fg_ex   [N],
  input  logic [1:0]      fg_part [N],
  output logic            cfg_ok  [N],
  // program load, per physical IF row
  input  logic            prog_we [N],
  input  word_t           prog_addr,
  input  word_t           prog_data,
  // observation of logical core k
  input  word_t           dbg_addr [N],
  output word_t           dbg_data [N],
  output logic            halted   [N],
  output ex_stats_t       ex_stats [N],
  output me_stats_t       me_stats [N]
);
  localparam int SW1 = $clog2(N);       // select width, N sources
  localparam int SW2 = $clog2(N + 1);   // select width, N+1 sources
  localparam int DW  = $clog2(MAXD + 1);

  // vertical position of a row; the fabric (row N) sits above row 0
  function automatic int pos(int r);
    return (r == N) ? -1 : r;
  endfunction
  function automatic int hops(int r1, int r2);
    int d;
    d = pos(r1) - pos(r2);
    return (d < 0) ? -d : d;
  endfunction

  // ---------------------------------------------------------------- users of physical SBs
  logic           if_used [N],   ex_used [N],   me_used [N],   dc_used [N+1];
  logic [SW1-1:0] if_user [N],   ex_user [N],   me_user [N],   dc_user [N+1];
  logic           fg_ex_any;
  logic [SW1-1:0] fg_ex_user;

  always_comb begin
    for (int r = 0; r <= N; r++) begin
      if (r < N) begin
        if_used[r] = 1'b0; if_user[r] = '0;
        ex_used[r] = 1'b0; ex_user[r] = '0;
        me_used[r] = 1'b0; me_user[r] = '0;
      end
      dc_used[r] = 1'b0; dc_user[r] = '0;
    end
    fg_ex_any  = 1'b0;
    fg_ex_user = '0;
    for (int k = 0; k < N; k++) begin
      if (en[k]) begin
        for (int r = 0; r <= N; r++) begin
          if (r < N && int'(row_if[k]) == r) begin if_used[r] = 1'b1; if_user[r] = SW1'(k); end
          if (r < N && int'(row_ex[k]) == r) begin ex_used[r] = 1'b1; ex_user[r] = SW1'(k); end
          if (r < N && int'(row_me[k]) == r) begin me_used[r] = 1'b1; me_user[r] = SW1'(k); end
          if (int'(row_dc[k]) == r)          begin dc_used[r] = 1'b1; dc_user[r] = SW1'(k); end
        end
        if (fg_ex[k]) begin fg_ex_any = 1'b1; fg_ex_user = SW1'(k); end
      end
    end
  end

  // ---------------------------------------------------------------- configuration check
  always_comb begin
    for (int k = 0; k < N; k++) begin
      int loop_len, n_fg, n_share;
      loop_len = 1 + ((split[k] || fg_ex[k]) ? 1 : 0)
               + hops(int'(row_dc[k]), int'(row_ex[k]))
               + hops(int'(row_ex[k]), int'(row_me[k]))
               + hops(int'(row_me[k]), int'(row_dc[k]));
      n_fg    = 0;
      n_share = 0;
      for (int j = 0; j < N; j++) begin
        if (en[j] && (fg_ex[j] || int'(row_dc[j]) == N)) n_fg++;
        if (en[j] && j != k && (row_if[j] == row_if[k] || row_dc[j] == row_dc[k] ||
                                row_ex[j] == row_ex[k] || row_me[j] == row_me[k])) n_share++;
      end
      cfg_ok[k] = !en[k] ||
                  (int'(row_if[k]) < N && int'(row_ex[k]) < N && int'(row_me[k]) < N &&
                   int'(row_dc[k]) <= N && n_share == 0 && n_fg <= 1 &&
                   loop_len <= BYP_DEPTH &&
                   (!(fg_ex[k] || int'(row_dc[k]) == N) || slow[k]));
    end
  end

  // ---------------------------------------------------------------- SB outputs
  redir_t ex_redir [N];
  if2dc_t if_out   [N];
  dc2ex_t dc_out   [N+1];
  ex2me_t ex_out   [N];
  wb_t    me_wb    [N];
  fwd_t   me_fwd   [N];
  aluop_t ex_fgop  [N];
  logic   ex_halted[N];
  ex_stats_t ex_st [N];
  me_stats_t me_st [N];
  word_t  me_dbg   [N];
  word_t  fg_res;

  logic if_clk [N], dc_clk [N+1], ex_clk [N], me_clk [N];
  assign dc_clk[N] = clk_slow;

  for (genvar r = 0; r < N; r++) begin : g_row
    // ---- IF
    redir_t if_redir;
    clk_sel u_cs_if (.clk_fast, .clk_slow, .rst, .slow(slow[if_user[r]] && if_used[r]), .clk_out(if_clk[r]));
    spare_link #(.NSRC(N), .MAXD(MAXD), .T(redir_t)) u_l_redir (
      .clk(if_clk[r]), .rst(rst || !if_used[r]), .src(ex_redir),
      .sel(SW1'(row_ex[if_user[r]])), .hops(DW'(hops(r, int'(row_ex[if_user[r]])))), .dout(if_redir));
    if_stage #(.IMEM_BYTES(IMEM_BYTES)) u_if (
      .clk(if_clk[r]), .rst(rst || !if_used[r]), .run(if_used[r]), .redir(if_redir), .out(if_out[r]),
      .prog_we(prog_we[r]), .prog_addr, .prog_data);

    // ---- DC
    if2dc_t dc_in;
    wb_t    dc_wb;
    clk_sel u_cs_dc (.clk_fast, .clk_slow, .rst, .slow(slow[dc_user[r]] && dc_used[r]), .clk_out(dc_clk[r]));
    spare_link #(.NSRC(N), .MAXD(MAXD), .T(if2dc_t)) u_l_dc_in (
      .clk(dc_clk[r]), .rst(rst || !dc_used[r]), .src(if_out),
      .sel(SW1'(row_if[dc_user[r]])), .hops(DW'(hops(r, int'(row_if[dc_user[r]])))), .dout(dc_in));
    spare_link #(.NSRC(N), .MAXD(MAXD), .T(wb_t)) u_l_dc_wb (
      .clk(dc_clk[r]), .rst(rst || !dc_used[r]), .src(me_wb),
      .sel(SW1'(row_me[dc_user[r]])), .hops(DW'(hops(r, int'(row_me[dc_user[r]])))), .dout(dc_wb));
    dc_stage u_dc (.clk(dc_clk[r]), .rst(rst || !dc_used[r]), .in(dc_in), .wb(dc_wb), .out(dc_out[r]));

    // ---- EX
    dc2ex_t ex_in;
    fwd_t   ex_fwd;
    logic   ex_fg_en;
    assign ex_fg_en = ex_used[r] && fg_ex[ex_user[r]];
    clk_sel u_cs_ex (.clk_fast, .clk_slow, .rst, .slow(slow[ex_user[r]] && ex_used[r]), .clk_out(ex_clk[r]));
    spare_link #(.NSRC(N+1), .MAXD(MAXD), .T(dc2ex_t)) u_l_ex_in (
      .clk(ex_clk[r]), .rst(rst || !ex_used[r]), .src(dc_out),
      .sel(SW2'(row_dc[ex_user[r]])), .hops(DW'(hops(r, int'(row_dc[ex_user[r]])))), .dout(ex_in));
    spare_link #(.NSRC(N), .MAXD(MAXD), .T(fwd_t)) u_l_ex_fwd (
      .clk(ex_clk[r]), .rst(rst || !ex_used[r]), .src(me_fwd),
      .sel(SW1'(row_me[ex_user[r]])), .hops(DW'(hops(r, int'(row_me[ex_user[r]])))), .dout(ex_fwd));
    ex_stage #(.BYP_DEPTH(BYP_DEPTH)) u_ex (
      .clk(ex_clk[r]), .rst(rst || !ex_used[r]), .in(ex_in), .fwd(ex_fwd),
      .split(split[ex_user[r]] && ex_used[r]), .fg_en(ex_fg_en), .fg_part(fg_part[ex_user[r]]),
      .fg_op(ex_fgop[r]), .fg_res(fg_res), .out(ex_out[r]), .redir(ex_redir[r]),
      .halted(ex_halted[r]), .stats(ex_st[r]));

    // ---- ME
    ex2me_t me_in;
    clk_sel u_cs_me (.clk_fast, .clk_slow, .rst, .slow(slow[me_user[r]] && me_used[r]), .clk_out(me_clk[r]));
    spare_link #(.NSRC(N), .MAXD(MAXD), .T(ex2me_t)) u_l_me_in (
      .clk(me_clk[r]), .rst(rst || !me_used[r]), .src(ex_out),
      .sel(SW1'(row_ex[me_user[r]])), .hops(DW'(hops(r, int'(row_ex[me_user[r]])))), .dout(me_in));
    me_stage #(.DMEM_BYTES(DMEM_BYTES), .BYP_DEPTH(BYP_DEPTH)) u_me (
      .clk(me_clk[r]), .rst(rst || !me_used[r]), .in(me_in), .wb(me_wb[r]), .fwd(me_fwd[r]),
      .dbg_addr(dbg_addr[me_user[r]]), .dbg_data(me_dbg[r]), .stats(me_st[r]));
  end

  // ---- the fine-grain fabric: DC row N, or one EX sub-block
  if2dc_t fg_dc_in;
  wb_t    fg_dc_wb;
  spare_link #(.NSRC(N), .MAXD(MAXD), .T(if2dc_t)) u_l_fg_in (
    .clk(clk_slow), .rst(rst || !dc_used[N]), .src(if_out),
    .sel(SW1'(row_if[dc_user[N]])), .hops(DW'(hops(N, int'(row_if[dc_user[N]])))), .dout(fg_dc_in));
  spare_link #(.NSRC(N), .MAXD(MAXD), .T(wb_t)) u_l_fg_wb (
    .clk(clk_slow), .rst(rst || !dc_used[N]), .src(me_wb),
    .sel(SW1'(row_me[dc_user[N]])), .hops(DW'(hops(N, int'(row_me[dc_user[N]])))), .dout(fg_dc_wb));
  fg_fabric u_fg (
    .clk(clk_slow), .rst, .mode_dc(dc_used[N]), .mode_ex(fg_ex_any), .part(fg_part[fg_ex_user]),
    .dc_in(fg_dc_in), .dc_wb(fg_dc_wb), .dc_out(dc_out[N]),
    .op(ex_fgop[SW1'(row_ex[fg_ex_user])]), .res(fg_res));

  // ---- per logical core observation
  always_comb begin
    for (int k = 0; k < N; k++) begin
      halted[k]   = ex_halted[SW1'(row_ex[k])];
      ex_stats[k] = ex_st[SW1'(row_ex[k])];
      me_stats[k] = me_st[SW1'(row_me[k])];
      dbg_data[k] = me_dbg[SW1'(row_me[k])];
    end
  end
endmodule
