// tb_fpm_top -- end-to-end test of the whole miner at its default size
// (K = W = 4, 340 general PEs), with no parameter overrides.
//
// Several projected databases are loaded and mined one after the other:
// the small 7-transaction example over items A..D, then random databases of
// 1 to 4 items and up to 150 transactions. Each is loaded through the host
// port (MSG_CLEAR, then MSG_TXN and the items of each transaction in
// increasing order), mined by the hardware candidate generator, and the
// reported frequent patterns are compared with supports counted directly
// from the transaction list. One candidate per database is also scanned
// through the host port and its support read back, as a host that compares
// supports in software would. A last database has transactions that do not
// fit (five items on a four-level tree; five different first items for four
// level-1 PEs) and must raise overflow.
//
// The test counts how often every PE rule fires across the whole tree
// (the four WRITE steps, the SCAN steps, count injection in COUNT mode), plus
// overflow, host scans, and candidates accepted and rejected by the
// threshold; any that never happens counts as a failure.
module tb_fpm_top;
  import fpm_pkg::*;

  localparam int unsigned ITEM_W = 8;
  localparam int unsigned CNT_W  = 20;
  localparam int unsigned K      = 4;
  localparam int unsigned W      = 4;
  localparam int unsigned N      = 4;
  localparam int NPE   = num_pes(K, W);
  localparam int MAXTX = 150;

  logic                   clk = 1'b0;
  logic                   rst;
  msg_kind_e              host_kind;
  logic [ITEM_W-1:0]      host_item;
  logic                   host_ready;
  logic [CNT_W-1:0]       support;
  logic                   support_valid, count_busy, overflow;
  logic                   mine_start;
  logic [$clog2(N+1)-1:0] n_items;
  logic [CNT_W-1:0]       threshold;
  logic                   mine_done;
  logic                   pat_valid;
  logic [N-1:0]           pat_mask;
  logic [CNT_W-1:0]       pat_support;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fpm_top dut (.*);

  // ---------------- rule counters over all PEs ----------------
  pe_step_e pe_step   [NPE];
  logic     pe_inject [NPE];
  for (genvar l = 1; l <= W; l++) begin : mon_l
    for (genvar j = 0; j < level_size(K, l); j++) begin : mon_j
      assign pe_step[level_base(K, l) + j] = dut.u_tree.g_lvl[l].g_pe[j].u_pe.step;
      assign pe_inject[level_base(K, l) + j] =
        dut.u_tree.g_lvl[l].g_pe[j].u_pe.mode_q == MODE_COUNT &&
        dut.u_tree.g_lvl[l].g_pe[j].u_pe.in_kind != MSG_COUNT &&
        !dut.u_tree.g_lvl[l].g_pe[j].u_pe.sent_q &&
        dut.u_tree.g_lvl[l].g_pe[j].u_pe.isleaf_q &&
        dut.u_tree.g_lvl[l].g_pe[j].u_pe.full_q;
    end
  end

  int step_hits [16];
  int inject_hits = 0, overflow_hits = 0, host_scans = 0, accepted = 0, rejected = 0;

  always @(posedge clk) begin
    if (!rst) begin
      for (int p = 0; p < NPE; p++) begin
        step_hits[int'(pe_step[p])]++;
        if (pe_inject[p]) inject_hits++;
      end
    end
  end

  // ---------------- test data ----------------
  logic [N-1:0] db [MAXTX];
  int           ntx;

  function automatic int ref_support(input logic [N-1:0] s);
    int c = 0;
    for (int t = 0; t < ntx; t++) if ((db[t] & s) == s) c++;
    return c;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic send(input msg_kind_e k, input int item);
    host_kind = k;
    host_item = ITEM_W'(item);
    @(posedge clk);
    #1;
    host_kind = MSG_NONE;
    host_item = '0;
  endtask

  task automatic load_db();
    send(MSG_CLEAR, 0);
    for (int t = 0; t < ntx; t++) begin
      send(MSG_TXN, 0);
      for (int i = 0; i < N; i++) if (db[t][i]) send(MSG_ITEM, i);
    end
    repeat (2 * K * W) @(posedge clk);
    #1;
  endtask

  int reported [1 << N];
  int rep_sup  [1 << N];

  always @(posedge clk) begin
    if (pat_valid) begin
      reported[pat_mask]++;
      rep_sup[pat_mask] = int'(pat_support);
    end
  end

  task automatic mine(input int n, input int th);
    int done_cnt, cycles, exp;
    foreach (reported[i]) begin
      reported[i] = 0;
      rep_sup[i]  = 0;
    end
    n_items   = ($clog2(N+1))'(n);
    threshold = CNT_W'(th);
    mine_start = 1'b1;
    @(posedge clk);
    #1;
    mine_start = 1'b0;
    check(!host_ready, "host port closed while mining");
    done_cnt = 0;
    cycles = 1;
    while (!done_cnt) begin
      @(posedge clk);
      #1;
      cycles++;
      if (mine_done) done_cnt++;
    end
    @(posedge clk);                     // let the last pattern be recorded
    #1;
    // 1 (SCAN) + N (items) + 1 (COUNT) + 2KW+2 (collection) + 1 (decide)
    exp = ((1 << n) - 1) * (N + 2 * K * W + 5) + 1;
    check(cycles == exp, $sformatf("mining %0d items took %0d clocks, expected %0d", n, cycles, exp));
    check(host_ready, "host port open after mining");
    for (int m = 1; m < (1 << n); m++) begin
      int s;
      s = ref_support(N'(m));
      if (s >= th) begin
        accepted++;
        check(reported[m] == 1 && rep_sup[m] == s,
              $sformatf("pattern %b support %0d: reported %0d times with %0d", m[N-1:0], s, reported[m], rep_sup[m]));
      end else begin
        rejected++;
        check(reported[m] == 0, $sformatf("pattern %b support %0d < %0d reported", m[N-1:0], s, th));
      end
    end
    for (int m = (1 << n); m < (1 << N); m++) check(reported[m] == 0, "pattern outside the item range");
  endtask

  // Host-driven scan of one candidate; returns the support read back.
  task automatic host_scan(input logic [N-1:0] s);
    int t;
    send(MSG_SCAN, 0);
    for (int i = 0; i < N; i++) if (s[i]) send(MSG_ITEM, i);
    send(MSG_COUNT, 0);
    t = 1;
    while (!support_valid && t < 200) begin
      @(posedge clk);
      #1;
      t++;
    end
    host_scans++;
    check(t == 2 * K * W + 2, $sformatf("host scan latency %0d", t));
    check(int'(support) == ref_support(s), $sformatf("host scan %b: %0d, expected %0d", s, support, ref_support(s)));
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_kind  = MSG_NONE;
    host_item  = '0;
    mine_start = 1'b0;
    n_items    = '0;
    threshold  = '0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    rst = 1'b0;

    // The example database (A..D = items 0..3), minimum support 4.
    ntx = 7;
    db[0] = 4'b1110; db[1] = 4'b0110; db[2] = 4'b1101; db[3] = 4'b1101;
    db[4] = 4'b0111; db[5] = 4'b0111; db[6] = 4'b1011;
    load_db();
    check(!overflow, "example database fits");
    mine(4, 4);
    host_scan(4'b1010);                 // {B, D}: support 2
    host_scan(4'b1100);                 // {C, D}: support 3

    // Random projected databases.
    for (int r = 0; r < 24; r++) begin
      int n;
      n   = (r % N) + 1;
      ntx = int'($urandom_range(1, MAXTX));
      for (int t = 0; t < ntx; t++) begin
        logic [N-1:0] s;
        do s = N'($urandom) & N'((1 << n) - 1); while (s == '0);
        db[t] = s;
      end
      load_db();
      check(!overflow, "random database fits");
      mine(n, int'($urandom_range(1, ntx / 2 + 1)));
      host_scan(N'((1 << n) - 1));
    end

    // Databases that do not fit.
    ntx = 0;
    send(MSG_CLEAR, 0);
    send(MSG_TXN, 0);
    for (int i = 0; i < 5; i++) send(MSG_ITEM, i);
    repeat (2 * K * W) @(posedge clk);
    #1;
    if (overflow) overflow_hits++;
    check(overflow, "overflow: five items on four levels");
    send(MSG_CLEAR, 0);
    repeat (2) @(posedge clk);
    #1;
    check(!overflow, "overflow cleared");
    for (int i = 0; i < 5; i++) begin
      send(MSG_TXN, 0);
      send(MSG_ITEM, i);
    end
    repeat (2 * K * W) @(posedge clk);
    #1;
    if (overflow) overflow_hits++;
    check(overflow, "overflow: five first items on four level-1 PEs");

    // Every mechanism must have happened.
    check(step_hits[STEP_W_STORE]   > 0, "WRITE store never happened");
    check(step_hits[STEP_W_MATCH]   > 0, "WRITE match never happened");
    check(step_hits[STEP_W_SIBLING] > 0, "WRITE pass to sibling never happened");
    check(step_hits[STEP_W_CHILD]   > 0, "WRITE pass to child never happened");
    check(step_hits[STEP_S_EMPTY]   > 0, "SCAN empty PE never happened");
    check(step_hits[STEP_S_MATCH]   > 0, "SCAN match never happened");
    check(step_hits[STEP_S_LESS]    > 0, "SCAN door closing never happened");
    check(step_hits[STEP_S_GREATER] > 0, "SCAN larger item never happened");
    check(step_hits[STEP_S_LOCKED]  > 0, "SCAN match behind closed door never happened");
    check(inject_hits   > 0, "COUNT injection never happened");
    check(overflow_hits > 0, "overflow never happened");
    check(host_scans    > 0, "host scan never happened");
    check(accepted      > 0, "no candidate reached the threshold");
    check(rejected      > 0, "no candidate was below the threshold");
    $display("rule hits: W store %0d, W match %0d, W sibling %0d, W child %0d",
             step_hits[STEP_W_STORE], step_hits[STEP_W_MATCH], step_hits[STEP_W_SIBLING], step_hits[STEP_W_CHILD]);
    $display("rule hits: S empty %0d, S match %0d, S less %0d, S greater %0d, S locked %0d",
             step_hits[STEP_S_EMPTY], step_hits[STEP_S_MATCH], step_hits[STEP_S_LESS],
             step_hits[STEP_S_GREATER], step_hits[STEP_S_LOCKED]);
    $display("count injections %0d, overflows %0d, host scans %0d, accepted %0d, rejected %0d",
             inject_hits, overflow_hits, host_scans, accepted, rejected);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
