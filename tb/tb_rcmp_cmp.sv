// tb_rcmp_cmp: end-to-end test of the core array at its default size (8 cores,
// 32-KByte memories). Each scenario configures the array, loads a different random
// program into every core, runs until every enabled core has halted and compares
// the 32 data words and the 15 registers (dumped by each program) with the
// reference model. Scenarios: fault-free cores; cores assembled from scattered
// rows (extra pipeline stages); a DC stage in the fine-grain fabric; an EX
// sub-block in the fabric (split EX, slow clock); split EX alone; a degraded array
// with disabled cores. It counts how often each mechanism happened and fails any
// that never did.
module tb_rcmp_cmp;
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
  // mechanism counters
  longint n_flush_hazard = 0, n_flush_branch = 0, n_dropped = 0, n_ex_bypass = 0,
          n_ex_fills = 0, n_me_bypass = 0, n_fg_ops = 0, n_split = 0, n_extra_stage_cores = 0,
          n_fg_dc = 0, n_slow = 0, n_disabled = 0;

  initial begin : watchdog
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int hop(int a, int b);
    int pa, pb;
    pa = (a == N) ? -1 : a;
    pb = (b == N) ? -1 : b;
    return (pa > pb) ? pa - pb : pb - pa;
  endfunction

  task automatic run_scenario(string name, int n_body);
    iss    ref_m [N];
    word_t p [$];
    int    cyc;
    bit    all_done;
    rst = 1'b1;
    foreach (prog_we[i]) prog_we[i] = 1'b0;
    repeat (4) @(posedge clk_fast);
    // load a program into the IF row of every enabled core
    for (int k = 0; k < N; k++) begin
      if (!en[k]) continue;
      gen_program(p, n_body);
      ref_m[k] = new();
      ref_m[k].prog = p;
      ref_m[k].run(200000);
      for (int i = 0; i < p.size(); i++) begin
        @(negedge clk_fast);
        prog_we[row_if[k]] = 1'b1;
        prog_addr = 4 * i;
        prog_data = p[i];
      end
      @(negedge clk_fast);
      prog_we[row_if[k]] = 1'b0;
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (!cfg_ok[k]) begin
        failures++;
        $display("[%s] core %0d: configuration reported illegal", name, k);
      end
      if (en[k]) begin
        if (hop(row_if[k], row_dc[k]) + hop(row_dc[k], row_ex[k]) + hop(row_ex[k], row_me[k]) > 0)
          n_extra_stage_cores++;
        if (int'(row_dc[k]) == N) n_fg_dc++;
        if (slow[k]) n_slow++;
      end else n_disabled++;
    end
    repeat (6) @(posedge clk_slow);
    rst = 1'b0;
    cyc = 0;
    do begin
      @(posedge clk_fast);
      cyc++;
      all_done = 1'b1;
      for (int k = 0; k < N; k++) if (en[k] && !halted[k]) all_done = 1'b0;
    end while (!all_done && cyc < 30000);
    checks++;
    if (!all_done) begin
      failures++;
      $display("[%s] not all cores halted", name);
    end
    repeat (20) @(posedge clk_slow);   // let the last stores land
    for (int k = 0; k < N; k++) begin
      int bad;
      if (!en[k]) continue;
      bad = 0;
      for (int i = 0; i < 32; i++) begin
        dbg_addr[k] = DATA_BASE + 4 * i;
        #1;
        checks++;
        if (dbg_data[k] !== ref_m[k].ld(DATA_BASE + 4 * i)) begin
          failures++; bad++;
          if (bad < 4) $display("[%s] core %0d mem[%h] = %h, expected %h", name, k,
                                DATA_BASE + 4 * i, dbg_data[k], ref_m[k].ld(DATA_BASE + 4 * i));
        end
      end
      for (int i = 1; i < 16; i++) begin
        dbg_addr[k] = DUMP_BASE + 4 * i;
        #1;
        checks++;
        if (dbg_data[k] !== ref_m[k].r[i]) begin
          failures++; bad++;
          if (bad < 4) $display("[%s] core %0d r%0d = %h, expected %h", name, k, i, dbg_data[k], ref_m[k].r[i]);
        end
      end
      checks++;
      if (ex_stats[k].executed < 32'(ref_m[k].steps)) begin
        failures++;
        $display("[%s] core %0d executed %0d < %0d instructions", name, k, ex_stats[k].executed, ref_m[k].steps);
      end
      n_flush_hazard += ex_stats[k].flush_hazard;
      n_flush_branch += ex_stats[k].flush_branch;
      n_dropped      += ex_stats[k].dropped;
      n_ex_bypass    += ex_stats[k].ex_bypass;
      n_ex_fills     += ex_stats[k].ex_fills;
      n_fg_ops       += ex_stats[k].fg_ops;
      n_split        += ex_stats[k].split_ops;
      n_me_bypass    += me_stats[k].me_bypass;
    end
    $display("[%s] %0d fast cycles; core 0: %0d executed, %0d hazard flushes, %0d branch flushes",
             name, cyc, ex_stats[0].executed, ex_stats[0].flush_hazard, ex_stats[0].flush_branch);
  endtask

  task automatic identity();
    for (int k = 0; k < N; k++) begin
      en[k] = 1'b1; split[k] = 1'b0; slow[k] = 1'b0; fg_ex[k] = 1'b0; fg_part[k] = '0;
      row_if[k] = RIW'(k); row_dc[k] = RIW'(k); row_ex[k] = RIW'(k); row_me[k] = RIW'(k);
      dbg_addr[k] = '0;
    end
  endtask

  initial begin
    int n_body;
    #1;   // rst rises after time 0 so the clock selectors see a reset edge
    identity();
    prog_addr = '0;
    prog_data = '0;
    if (!$value$plusargs("BODY=%d", n_body)) n_body = 400;

    // 1. fault-free array
    run_scenario("fault-free", n_body);

    // 2. scattered rows: every column rotated by a different amount
    identity();
    for (int k = 0; k < N; k++) begin
      row_dc[k] = RIW'((k + 1) % N);
      row_ex[k] = RIW'((k + 3) % N);
      row_me[k] = RIW'((k + 2) % N);
    end
    run_scenario("scattered", n_body);

    // 3. core 2's DC in the fine-grain fabric (its own DC row is faulty)
    identity();
    row_dc[2] = RIW'(N);
    slow[2]   = 1'b1;
    run_scenario("fg-dc", n_body);

    // 4. one EX sub-block of core 5 in the fabric, for each sub-block in turn
    for (int pt = 0; pt < 3; pt++) begin
      identity();
      fg_ex[5]   = 1'b1;
      fg_part[5] = 2'(pt);
      slow[5]    = 1'b1;
      run_scenario($sformatf("fg-ex-part%0d", pt), n_body);
    end

    // 5. split EX without the fabric, combined with a spare ME two rows away
    identity();
    split[1]  = 1'b1;
    row_me[1] = 3'd3;
    row_me[3] = 3'd1;
    run_scenario("split", n_body);

    // 6. degraded array: three cores switched off, survivors borrow their SBs
    identity();
    en[4] = 1'b0; en[6] = 1'b0; en[7] = 1'b0;
    row_ex[0] = 3'd7;   // EX of core 0 is faulty: use row 7's
    row_dc[3] = 3'd6;   // DC of core 3 is faulty: use row 6's
    row_me[5] = 3'd4;
    run_scenario("degraded", n_body);

    $display("mechanisms: hazard-flush=%0d branch-flush=%0d dropped=%0d ex-bypass=%0d ex-fill=%0d me-bypass=%0d fg-ops=%0d split=%0d extra-stage-cores=%0d fg-dc=%0d slow=%0d disabled=%0d",
             n_flush_hazard, n_flush_branch, n_dropped, n_ex_bypass, n_ex_fills, n_me_bypass,
             n_fg_ops, n_split, n_extra_stage_cores, n_fg_dc, n_slow, n_disabled);
    checks += 12;
    if (n_flush_hazard == 0) begin failures++; $display("no hazard flush happened"); end
    if (n_flush_branch == 0) begin failures++; $display("no branch flush happened"); end
    if (n_dropped == 0)      begin failures++; $display("no instruction dropped by SIB"); end
    if (n_ex_bypass == 0)    begin failures++; $display("no EX bypass happened"); end
    if (n_ex_fills == 0)     begin failures++; $display("no ME->EX forward happened"); end
    if (n_me_bypass == 0)    begin failures++; $display("no ME bypass happened"); end
    if (n_fg_ops == 0)       begin failures++; $display("no fabric sub-block op happened"); end
    if (n_split == 0)        begin failures++; $display("no split-EX op happened"); end
    if (n_extra_stage_cores == 0) begin failures++; $display("no extra stages used"); end
    if (n_fg_dc == 0)        begin failures++; $display("no fabric DC used"); end
    if (n_slow == 0)         begin failures++; $display("slow clock never used"); end
    if (n_disabled == 0)     begin failures++; $display("no core disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
