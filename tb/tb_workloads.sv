// tb_workloads -- loads projected databases as large as the benchmark
// databases the miner was evaluated on and mines them at the default size
// (K = W = 4).
//
// The benchmark contents are not reproduced here; for each benchmark the
// test generates a 4-item projected database with the same number of
// transactions as the full benchmark (chess 3196, BMS-WebView-2 77512,
// connect 67557, BMS-POS 515597, pumsb 49064, kosarak 990002), which is the
// largest a projected database of that benchmark can be. Transactions are
// random non-empty item subsets, skewed so that low-numbered items are more
// frequent, as after the frequency-descending item ordering. The test keeps
// a histogram of the transactions it sent, mines the tree with a threshold
// of one quarter of the transaction count, and checks every frequent
// pattern and its support against the histogram. This shows that the
// 20-bit support counters and the tree hold every benchmark's largest
// projected database.
module tb_workloads;
  import fpm_pkg::*;

  localparam int unsigned ITEM_W = 8;
  localparam int unsigned CNT_W  = 20;
  localparam int unsigned N      = 4;
  localparam int NBENCH = 6;
  localparam int NTX [NBENCH] = '{3196, 77512, 67557, 515597, 49064, 990002};

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

  int hist [1 << N];
  int reported [1 << N];
  int rep_sup  [1 << N];

  always @(posedge clk) begin
    if (pat_valid) begin
      reported[pat_mask]++;
      rep_sup[pat_mask] = int'(pat_support);
    end
  end

  function automatic int ref_support(input int s);
    int c = 0;
    for (int m = 0; m < (1 << N); m++) if ((m & s) == s) c += hist[m];
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
  endtask

  initial begin : watchdog
    repeat (12_000_000) @(posedge clk);
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

    for (int b = 0; b < NBENCH; b++) begin
      int th;
      foreach (hist[i]) begin
        hist[i] = 0;
        reported[i] = 0;
        rep_sup[i] = 0;
      end
      send(MSG_CLEAR, 0);
      for (int t = 0; t < NTX[b]; t++) begin
        int s;
        // item i present with probability (4 - i) / 5
        do begin
          s = 0;
          for (int i = 0; i < N; i++) if ($urandom_range(0, 4) < 4 - i) s |= (1 << i);
        end while (s == 0);
        hist[s]++;
        send(MSG_TXN, 0);
        for (int i = 0; i < N; i++) if (s[i]) send(MSG_ITEM, i);
      end
      host_kind = MSG_NONE;
      repeat (2 * 4 * 4) @(posedge clk);
      #1;
      check(!overflow, "projected database fits");
      th = NTX[b] / 4;
      n_items = ($clog2(N+1))'(N);
      threshold = CNT_W'(th);
      mine_start = 1'b1;
      @(posedge clk);
      #1;
      mine_start = 1'b0;
      while (!mine_done) begin
        @(posedge clk);
        #1;
      end
      @(posedge clk);
      #1;
      for (int m = 1; m < (1 << N); m++) begin
        int s;
        s = ref_support(m);
        check((s >= th) ? (reported[m] == 1 && rep_sup[m] == s) : reported[m] == 0,
              $sformatf("benchmark %0d pattern %b: support %0d, reported %0d times with %0d",
                        b, m[N-1:0], s, reported[m], rep_sup[m]));
      end
      $display("benchmark %0d: %0d transactions, support of {0} = %0d", b, NTX[b], ref_support(1));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
