// tb_core_configs: runs one random program on a single core of the default-size
// array in each of the single-core configurations used to evaluate the design:
// coarse-grain sparing with 0, 2, 5 and 15 extra pipeline stages, the DC stage in
// the fine-grain fabric, and one EX sub-block in the fabric. Every run must give
// the reference model's results; cycles must grow with the number of extra stages.
// It prints instructions per cycle and, using the 450 MHz / 200 MHz clock rates of
// coarse-grain and fabric cores, relative instruction rates.
module tb_core_configs;
  import rcmp_pkg::*;
  import tb_isa_pkg::*;

  localparam int N   = 8;
  localparam int RIW = $clog2(N + 1);

  logic clk_fast = 1'b0, clk_slow = 1'b0, rst = 1'b0;
  always #5  clk_fast = !clk_fast;
  always #11 clk_slow = !clk_slow;

  logic            en [N], split [N], slow [N], fg_ex [N], cfg_ok [N], prog_we [N], halted [N];
  logic [RIW-1:0]  row_if [N], row_dc [N], row_ex [N], row_me [N];
  logic [1:0]      fg_part [N];
  word_t           prog_addr, prog_data;
  word_t           dbg_addr [N], dbg_data [N];
  ex_stats_t       ex_stats [N];
  me_stats_t       me_stats [N];

  rcmp_cmp dut (.*);

  int checks = 0, failures = 0;
  word_t p [$];
  iss    ref_m;

  initial begin : watchdog
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // single core 0 from rows (i, d, e, m); returns its run time in its own clock cycles
  task automatic run_cfg(string name, int i, int d, int e, int m, bit fgx, output int cycles);
    rst = 1'b1;
    for (int k = 0; k < N; k++) begin
      en[k] = 1'b0; split[k] = 1'b0; slow[k] = 1'b0; fg_ex[k] = 1'b0; fg_part[k] = '0;
      row_if[k] = RIW'(k); row_dc[k] = RIW'(k); row_ex[k] = RIW'(k); row_me[k] = RIW'(k);
      dbg_addr[k] = '0; prog_we[k] = 1'b0;
    end
    en[0] = 1'b1;
    row_if[0] = RIW'(i); row_dc[0] = RIW'(d); row_ex[0] = RIW'(e); row_me[0] = RIW'(m);
    fg_ex[0] = fgx; fg_part[0] = 2'd0;
    slow[0] = fgx || d == N;
    for (int a = 0; a < p.size(); a++) begin
      @(negedge clk_fast);
      prog_we[i] = 1'b1; prog_addr = 4 * a; prog_data = p[a];
    end
    @(negedge clk_fast);
    prog_we[i] = 1'b0;
    checks++;
    if (!cfg_ok[0]) begin failures++; $display("[%s] configuration reported illegal", name); end
    repeat (6) @(posedge clk_slow);
    rst = 1'b0;
    cycles = 0;
    while (!halted[0] && cycles < 30000) begin
      if (slow[0]) @(posedge clk_slow); else @(posedge clk_fast);
      cycles++;
    end
    repeat (20) @(posedge clk_slow);
    checks++;
    if (!halted[0]) begin failures++; $display("[%s] did not halt", name); end
    for (int a = 0; a < 32; a++) begin
      dbg_addr[0] = DATA_BASE + 4 * a; #1; checks++;
      if (dbg_data[0] !== ref_m.ld(DATA_BASE + 4 * a)) begin failures++; $display("[%s] mem word %0d wrong", name, a); end
    end
    for (int r = 1; r < 16; r++) begin
      dbg_addr[0] = DUMP_BASE + 4 * r; #1; checks++;
      if (dbg_data[0] !== ref_m.r[r]) begin failures++; $display("[%s] r%0d wrong", name, r); end
    end
    $display("[%-18s] %6d cycles  IPC %0.3f  hazard flushes %0d  branch flushes %0d", name, cycles,
             real'(ref_m.steps) / real'(cycles), ex_stats[0].flush_hazard, ex_stats[0].flush_branch);
  endtask

  initial begin
    int c0, c2, c5, c15, cdc, cex;
    real ips0;
    #1;
    gen_program(p, 600);
    ref_m = new();
    ref_m.prog = p;
    ref_m.run(200000);
    run_cfg("CG, 0 extra",  0, 0, 0, 0, 0, c0);
    run_cfg("CG, 2 extra",  0, 1, 0, 0, 0, c2);   // IF0->DC1->EX0: 1 + 1
    run_cfg("CG, 5 extra",  0, 2, 0, 1, 0, c5);   // 2 + 2 + 1
    run_cfg("CG, 15 extra", 0, 7, 0, 1, 0, c15);  // 7 + 7 + 1
    run_cfg("CG+FG(DC)",    0, N, 0, 0, 0, cdc);  // fabric DC above row 0: 1 + 1
    run_cfg("CG+FG(EX)",    0, 0, 0, 0, 1, cex);  // adder sub-block in the fabric
    checks += 3;
    if (!(c0 < c2)) begin failures++; $display("2 extra stages not slower than 0"); end
    if (!(c2 < c5)) begin failures++; $display("5 extra stages not slower than 2"); end
    if (!(c5 < c15)) begin failures++; $display("15 extra stages not slower than 5"); end
    ips0 = 450.0 / c0;
    $display("instruction rate relative to CG 0 extra (450 MHz CG, 200 MHz with fabric):");
    $display("  2 extra %0.2f  5 extra %0.2f  15 extra %0.2f  FG(DC) %0.2f  FG(EX) %0.2f",
             (450.0 / c2) / ips0, (450.0 / c5) / ips0, (450.0 / c15) / ips0,
             (200.0 / cdc) / ips0, (200.0 / cex) / ips0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
