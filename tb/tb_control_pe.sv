// tb_control_pe -- checks the root PE on its own (K = 2, W = 3).
//  * every host message appears on the leftmost-child link one clock later;
//  * after MSG_COUNT, counts arriving from the child in clocks 1 .. 2*K*W+1
//    are added up, a count arriving later is not, and support_valid pulses
//    for one clock 2*K*W+2 clocks after MSG_COUNT with the sum;
//  * busy covers the collection window;
//  * overflow is sticky and cleared by MSG_CLEAR.
module tb_control_pe;
  import fpm_pkg::*;

  localparam int unsigned ITEM_W = 8;
  localparam int unsigned CNT_W  = 20;
  localparam int unsigned K      = 2;
  localparam int unsigned W      = 3;
  localparam int DRAIN = 2 * K * W + 1;

  logic              clk = 1'b0;
  logic              rst;
  msg_kind_e         in_kind, chd_kind;
  logic [ITEM_W-1:0] in_item, chd_item;
  logic [CNT_W-1:0]  support, n_bottom;
  logic              support_valid, busy, overflow, tree_overflow;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  control_pe #(.ITEM_W(ITEM_W), .CNT_W(CNT_W), .K(K), .W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected, valid_seen;
    in_kind = MSG_NONE;
    in_item = '0;
    n_bottom = '0;
    tree_overflow = 1'b0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;

    // Forwarding, one clock later.
    for (int i = 0; i < 6; i++) begin
      msg_kind_e k;
      k = msg_kind_e'(i);
      in_kind = k;
      in_item = ITEM_W'(i * 17 + 3);
      @(posedge clk);
      #1;
      check(chd_kind == k && (k == MSG_NONE || int'(chd_item) == i * 17 + 3),
            $sformatf("forward of %s", k.name()));
    end
    in_kind = MSG_NONE;
    @(posedge clk);
    #1;

    // Collection window.
    for (int rep = 0; rep < 3; rep++) begin
      in_kind = MSG_COUNT;
      n_bottom = 20'd50;             // same clock as MSG_COUNT: not counted
      @(posedge clk);
      #1;
      in_kind = MSG_NONE;
      expected = 0;
      valid_seen = 0;
      for (int t = 1; t <= DRAIN + 3; t++) begin
        // clocks 1..DRAIN are inside the window
        n_bottom = CNT_W'((t * 7 + rep) % 5);
        if (t <= DRAIN) expected += (t * 7 + rep) % 5;
        check(busy == (t <= DRAIN), $sformatf("busy at clock %0d", t));
        @(posedge clk);
        #1;
        if (support_valid) begin
          valid_seen++;
          check(t == DRAIN, $sformatf("support_valid at clock %0d, expected %0d", t + 1, DRAIN + 1));
          check(int'(support) == expected, $sformatf("support %0d, expected %0d", support, expected));
        end
      end
      check(valid_seen == 1, $sformatf("support_valid pulses %0d times", valid_seen));
      n_bottom = '0;
    end

    // Overflow flag.
    check(!overflow, "overflow clear after reset");
    tree_overflow = 1'b1;
    @(posedge clk);
    #1;
    tree_overflow = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    check(overflow, "overflow is sticky");
    in_kind = MSG_CLEAR;
    @(posedge clk);
    #1;
    in_kind = MSG_NONE;
    check(!overflow, "overflow cleared by MSG_CLEAR");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
