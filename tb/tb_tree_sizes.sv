// tb_tree_sizes -- runs the whole miner at every tree size of the
// clock-frequency sweep: K = 1..4 children per PE and W = 2..4 levels
// (12 configurations, side by side, each with its own stimulus).
//
// Each configuration loads a random projected database of N = min(K, W)
// items and 40 transactions, mines it with a threshold of 5, and checks
// every reported pattern and support against a count taken from the
// transaction list, as well as the mining time
// (2**N - 1) * (N + 2*K*W + 5) + 1 clocks.
module tb_tree_sizes;
  import fpm_pkg::*;

  localparam int unsigned ITEM_W = 8;
  localparam int unsigned CNT_W  = 20;
  localparam int NTX = 40;
  localparam int TH  = 5;

  logic clk = 1'b0;
  logic rst;
  int   checks = 0, failures = 0, finished = 0;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  for (genvar gk = 1; gk <= 4; gk++) begin : g_k
    for (genvar gw = 2; gw <= 4; gw++) begin : g_w
      localparam int unsigned N = (gk < gw) ? gk : gw;

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

      fpm_top #(.ITEM_W(ITEM_W), .CNT_W(CNT_W), .K(gk), .W(gw)) dut (.*);

      logic [N-1:0] db [NTX];
      int           reported [1 << N];
      int           rep_sup  [1 << N];

      function automatic int ref_support(input int s);
        int c = 0;
        for (int t = 0; t < NTX; t++) if ((int'(db[t]) & s) == s) c++;
        return c;
      endfunction

      always @(posedge clk) begin
        if (!rst && pat_valid) begin
          reported[pat_mask]++;
          rep_sup[pat_mask] = int'(pat_support);
        end
      end

      initial begin
        int cycles;
        host_kind  = MSG_NONE;
        host_item  = '0;
        mine_start = 1'b0;
        n_items    = '0;
        threshold  = '0;
        foreach (reported[i]) begin
          reported[i] = 0;
          rep_sup[i]  = 0;
        end
        for (int t = 0; t < NTX; t++) begin
          logic [N-1:0] s;
          do s = N'($urandom); while (s == '0);
          db[t] = s;
        end
        @(negedge rst);
        #1;
        host_kind = MSG_CLEAR;
        @(posedge clk);
        #1;
        for (int t = 0; t < NTX; t++) begin
          host_kind = MSG_TXN;
          @(posedge clk);
          #1;
          for (int i = 0; i < int'(N); i++) begin
            if (db[t][i]) begin
              host_kind = MSG_ITEM;
              host_item = ITEM_W'(i);
              @(posedge clk);
              #1;
            end
          end
        end
        host_kind = MSG_NONE;
        repeat (2 * gk * gw) @(posedge clk);
        #1;
        check(!overflow, $sformatf("K=%0d W=%0d: database fits", gk, gw));
        n_items = ($clog2(N+1))'(N);
        threshold = CNT_W'(TH);
        mine_start = 1'b1;
        @(posedge clk);
        #1;
        mine_start = 1'b0;
        cycles = 1;
        while (!mine_done) begin
          @(posedge clk);
          #1;
          cycles++;
        end
        @(posedge clk);
        #1;
        check(cycles == ((1 << N) - 1) * (N + 2 * gk * gw + 5) + 1,
              $sformatf("K=%0d W=%0d: mining took %0d clocks", gk, gw, cycles));
        for (int m = 1; m < (1 << N); m++) begin
          int s;
          s = ref_support(m);
          check((s >= TH) ? (reported[m] == 1 && rep_sup[m] == s) : reported[m] == 0,
                $sformatf("K=%0d W=%0d: pattern %0d support %0d reported %0d times with %0d",
                          gk, gw, m, s, reported[m], rep_sup[m]));
        end
        finished++;
      end
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    rst = 1'b0;
    wait (finished == 12);
    check(finished == 12, "all configurations finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
