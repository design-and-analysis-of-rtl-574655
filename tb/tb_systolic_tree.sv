// tb_systolic_tree -- builds the 7-transaction example database (items
// A..D numbered 0..3) in a tree with K = 2 children and W = 3 levels, and
// checks:
//  * the item and count stored in every one of the 14 general PEs after
//    WRITE mode (the expected tree has B:2, A:5 on level 1; C:2, empty, C:2,
//    B:3 on level 2; D:1, -, -, -, D:2, -, C:2, D:1 on level 3);
//  * the support of every one of the 15 candidate item sets, compared with
//    a count taken directly from the transaction list;
//  * the SCAN of {B, D}: the reporting PEs are PE7 and PE14 only, PE5 has
//    closed its bottom door, PE14 sets IsLeaf on the 9th clock after the
//    SCAN signal entered, and the support arrives 2*K*W+2 clocks after
//    MSG_COUNT;
//  * overflow when a transaction longer than W is written, and its reset
//    by MSG_CLEAR.
module tb_systolic_tree;
  import fpm_pkg::*;

  localparam int unsigned ITEM_W = 8;
  localparam int unsigned CNT_W  = 20;
  localparam int unsigned K      = 2;
  localparam int unsigned W      = 3;
  localparam int NPE = num_pes(K, W);

  logic              clk = 1'b0;
  logic              rst;
  msg_kind_e         in_kind;
  logic [ITEM_W-1:0] in_item;
  logic [CNT_W-1:0]  support;
  logic              support_valid, busy, overflow;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  systolic_tree #(.ITEM_W(ITEM_W), .CNT_W(CNT_W), .K(K), .W(W)) dut (.*);

  // Views of the PEs' state, indexed like the drawing's PE numbers minus 1.
  logic              pe_full   [NPE];
  logic [ITEM_W-1:0] pe_item   [NPE];
  logic [CNT_W-1:0]  pe_count  [NPE];
  logic              pe_isleaf [NPE];
  logic              pe_door   [NPE];
  for (genvar l = 1; l <= W; l++) begin : mon_l
    for (genvar j = 0; j < level_size(K, l); j++) begin : mon_j
      assign pe_full  [level_base(K, l) + j] = dut.g_lvl[l].g_pe[j].u_pe.full_q;
      assign pe_item  [level_base(K, l) + j] = dut.g_lvl[l].g_pe[j].u_pe.item_q;
      assign pe_count [level_base(K, l) + j] = dut.g_lvl[l].g_pe[j].u_pe.count_q;
      assign pe_isleaf[level_base(K, l) + j] = dut.g_lvl[l].g_pe[j].u_pe.isleaf_q;
      assign pe_door  [level_base(K, l) + j] = dut.g_lvl[l].g_pe[j].u_pe.door_q;
    end
  end

  // Example database, one bit per item (bit 0 = A ... bit 3 = D).
  localparam logic [3:0] DB [7] = '{4'b1110, 4'b0110, 4'b1101, 4'b1101,
                                    4'b0111, 4'b0111, 4'b1011};

  // Expected tree: item (or -1 for an empty PE) and count, PE1..PE14.
  localparam int EXP_ITEM [14] = '{1, 0, 2, -1, 2, 1, 3, -1, -1, -1, 3, -1, 2, 3};
  localparam int EXP_CNT  [14] = '{2, 5, 2,  0, 2, 3, 1,  0,  0,  0, 2,  0, 2, 1};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(input msg_kind_e k, input int item);
    in_kind = k;
    in_item = ITEM_W'(item);
    @(posedge clk);
    #1;
    in_kind = MSG_NONE;
    in_item = '0;
  endtask

  task automatic write_set(input logic [3:0] s);
    send(MSG_TXN, 0);
    for (int i = 0; i < 4; i++) if (s[i]) send(MSG_ITEM, i);
  endtask

  // Scan one candidate and return its support; also checks the latency.
  task automatic scan(input logic [3:0] s, output int sup);
    int t;
    send(MSG_SCAN, 0);
    for (int i = 0; i < 4; i++) if (s[i]) send(MSG_ITEM, i);
    in_kind = MSG_COUNT;
    @(posedge clk);
    #1;
    in_kind = MSG_NONE;
    t = 1;
    while (!support_valid) begin
      @(posedge clk);
      #1;
      t++;
    end
    check(t == 2 * K * W + 2, $sformatf("support latency %0d, expected %0d", t, 2 * K * W + 2));
    sup = int'(support);
  endtask

  function automatic int ref_support(input logic [3:0] s);
    int c = 0;
    for (int t = 0; t < 7; t++) if ((DB[t] & s) == s) c++;
    return c;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sup, t;
    in_kind = MSG_NONE;
    in_item = '0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    rst = 1'b0;
    send(MSG_CLEAR, 0);
    for (int t = 0; t < 7; t++) write_set(DB[t]);
    repeat (2 * K * W) @(posedge clk);
    #1;

    // Tree contents after WRITE mode.
    for (int p = 0; p < 14; p++) begin
      if (EXP_ITEM[p] < 0) begin
        check(!pe_full[p], $sformatf("PE%0d should be empty", p + 1));
      end else begin
        check(pe_full[p] && int'(pe_item[p]) == EXP_ITEM[p] && int'(pe_count[p]) == EXP_CNT[p],
              $sformatf("PE%0d holds %0d:%0d (full %0b), expected %0d:%0d", p + 1,
                        pe_item[p], pe_count[p], pe_full[p], EXP_ITEM[p], EXP_CNT[p]));
      end
    end
    check(!overflow, "no overflow expected for the example database");

    // SCAN of {B, D} with its cycle-by-cycle detail.
    in_kind = MSG_SCAN;                 // clock 1: SCAN enters the control PE
    @(posedge clk);
    #1;
    in_kind = MSG_ITEM; in_item = 1;    // clock 2: B
    @(posedge clk);
    #1;
    in_kind = MSG_ITEM; in_item = 3;    // clock 3: D
    @(posedge clk);
    #1;
    in_kind = MSG_NONE;
    // End of clock 3 has passed; PE14 sets IsLeaf at the end of clock 9.
    for (t = 4; t <= 9; t++) begin
      check(!pe_isleaf[13], $sformatf("PE14 IsLeaf too early (clock %0d)", t - 1));
      @(posedge clk);
      #1;
    end
    check(pe_isleaf[13], "PE14 IsLeaf set after clock 9");
    repeat (4) @(posedge clk);
    #1;
    for (int p = 0; p < 14; p++)
      check(pe_isleaf[p] == (p == 6 || p == 13), $sformatf("PE%0d IsLeaf=%0b after SCAN {B,D}", p + 1, pe_isleaf[p]));
    check(!pe_door[4], "PE5 bottom door closed by B");
    in_kind = MSG_COUNT;
    @(posedge clk);
    #1;
    in_kind = MSG_NONE;
    t = 1;
    while (!support_valid && t < 100) begin
      @(posedge clk);
      #1;
      t++;
    end
    check(t == 2 * K * W + 2, $sformatf("support latency %0d", t));
    check(support == 2, $sformatf("support {B,D} = %0d, expected 2", support));

    // Every candidate item set.
    for (int s = 1; s < 16; s++) begin
      scan(4'(s), sup);
      check(sup == ref_support(4'(s)), $sformatf("support of %b = %0d, expected %0d", s[3:0], sup, ref_support(4'(s))));
    end

    // Overflow: a transaction with more items than levels; then CLEAR.
    send(MSG_CLEAR, 0);
    send(MSG_TXN, 0);
    for (int i = 0; i < 4; i++) send(MSG_ITEM, i);
    repeat (2 * K * W) @(posedge clk);
    #1;
    check(overflow, "overflow for a 4-item transaction in a 3-level tree");
    send(MSG_CLEAR, 0);
    repeat (2) @(posedge clk);
    #1;
    check(!overflow, "overflow cleared by MSG_CLEAR");
    repeat (2 * K * W) @(posedge clk);
    #1;
    for (int p = 0; p < 14; p++) check(!pe_full[p], $sformatf("PE%0d empty after CLEAR", p + 1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
