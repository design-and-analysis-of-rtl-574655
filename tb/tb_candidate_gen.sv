// tb_candidate_gen -- checks the candidate sequencer against a stand-in for
// the systolic tree.
//
// The stand-in watches the message stream: it collects the items between
// MSG_SCAN and MSG_COUNT into an item mask, checks that they arrive in
// increasing order, and a few clocks after MSG_COUNT returns the support of
// that mask in a random database of 30 transactions. For several item counts
// and thresholds the test checks that every non-empty subset is scanned
// exactly once, that exactly the subsets with support >= threshold are
// reported with their support, and that done pulses once at the end.
module tb_candidate_gen;
  import fpm_pkg::*;

  localparam int unsigned ITEM_W = 8;
  localparam int unsigned CNT_W  = 20;
  localparam int unsigned N      = 4;
  localparam int NTX = 30;

  logic                   clk = 1'b0;
  logic                   rst;
  logic                   start;
  logic [$clog2(N+1)-1:0] n_items;
  logic [CNT_W-1:0]       threshold;
  logic                   busy, done;
  msg_kind_e              out_kind;
  logic [ITEM_W-1:0]      out_item;
  logic [CNT_W-1:0]       support;
  logic                   support_valid;
  logic                   pat_valid;
  logic [N-1:0]           pat_mask;
  logic [CNT_W-1:0]       pat_support;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  candidate_gen #(.ITEM_W(ITEM_W), .CNT_W(CNT_W), .N(N)) dut (.*);

  logic [N-1:0] db [NTX];

  function automatic int ref_support(input logic [N-1:0] s);
    int c = 0;
    for (int t = 0; t < NTX; t++) if ((db[t] & s) == s) c++;
    return c;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Stand-in tree.
  logic [N-1:0] cur_mask;
  int           last_item;
  int           scanned [1 << N];
  int           reported [1 << N];
  int           delay;
  logic [N-1:0] pending;

  always @(posedge clk) begin
    support_valid <= 1'b0;
    if (!rst) begin
      case (out_kind)
        MSG_SCAN: begin
          cur_mask  <= '0;
          last_item <= -1;
        end
        MSG_ITEM: begin
          check(int'(out_item) > last_item && int'(out_item) < int'(n_items),
                $sformatf("item %0d after %0d", out_item, last_item));
          cur_mask[out_item[$clog2(N)-1:0]] <= 1'b1;
          last_item <= int'(out_item);
        end
        MSG_COUNT: begin
          scanned[cur_mask]++;
          pending <= cur_mask;
          delay   <= 3 + int'($urandom_range(0, 5));
        end
        default: ;
      endcase
      if (delay > 0) begin
        delay <= delay - 1;
        if (delay == 1) begin
          support_valid <= 1'b1;
          support       <= CNT_W'(ref_support(pending));
        end
      end
      if (pat_valid) reported[pat_mask]++;
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
    int done_cnt;
    start = 1'b0;
    n_items = '0;
    threshold = '0;
    support = '0;
    delay = 0;
    cur_mask = '0;
    last_item = -1;
    for (int t = 0; t < NTX; t++) db[t] = N'($urandom);
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;

    for (int run = 0; run < 8; run++) begin
      int n, th;
      n  = (run % N) + 1;
      th = (run < 4) ? 8 : int'($urandom_range(1, 20));
      foreach (scanned[i]) begin
        scanned[i] = 0;
        reported[i] = 0;
      end
      n_items   = ($clog2(N+1))'(n);
      threshold = CNT_W'(th);
      start = 1'b1;
      @(posedge clk);
      #1;
      start = 1'b0;
      check(busy, "busy after start");
      done_cnt = 0;
      while (busy) begin
        @(posedge clk);
        #1;
        if (done) done_cnt++;
      end
      repeat (3) @(posedge clk);
      #1;
      check(done_cnt == 1, $sformatf("done pulsed %0d times", done_cnt));
      for (int m = 0; m < (1 << N); m++) begin
        int exp_scan, exp_rep;
        exp_scan = (m != 0 && m < (1 << n)) ? 1 : 0;
        exp_rep  = (exp_scan == 1 && ref_support(N'(m)) >= th) ? 1 : 0;
        check(scanned[m] == exp_scan, $sformatf("n=%0d mask %b scanned %0d times", n, m[N-1:0], scanned[m]));
        check(reported[m] == exp_rep, $sformatf("n=%0d th=%0d mask %b reported %0d times (support %0d)",
                                                n, th, m[N-1:0], reported[m], ref_support(N'(m))));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reported support must be the one the tree returned.
  always @(posedge clk) begin
    if (pat_valid)
      check(int'(pat_support) == ref_support(pat_mask) && int'(pat_support) >= int'(threshold),
            $sformatf("pattern %b support %0d", pat_mask, pat_support));
  end

endmodule
