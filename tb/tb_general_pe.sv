// tb_general_pe -- directed test of one general PE in all three modes.
//
// Two PEs are driven with the same messages: `dut` has a sibling and a
// child; `edge_pe` has neither (rightmost leaf). After every message the
// test compares both doors, the stored item and count and the flags with
// values worked out by hand from the WRITE, SCAN and COUNT rules:
//  WRITE: store into an empty PE, count++ on a repeat in a new transaction,
//         pass to the sibling when not in path (and keep passing even if a
//         later item equals the stored one, since InPath is then clear),
//         pass to the child when in path; overflow at the edge PE.
//  SCAN:  empty PE stops the item; equal item sets IsLeaf; smaller item
//         closes the bottom door; larger item goes to sibling and (door
//         open) child; equal item behind a closed door only goes right.
//  COUNT: N_Right + N_Bottom every cycle, plus the own count exactly once
//         when IsLeaf is set.
module tb_general_pe;
  import fpm_pkg::*;

  localparam int unsigned ITEM_W = 8;
  localparam int unsigned CNT_W  = 20;

  logic              clk = 1'b0;
  logic              rst;
  msg_kind_e         in_kind;
  logic [ITEM_W-1:0] in_item;
  msg_kind_e         sib_kind, chd_kind, e_sib_kind, e_chd_kind;
  logic [ITEM_W-1:0] sib_item, chd_item, e_sib_item, e_chd_item;
  logic [CNT_W-1:0]  n_right, n_bottom, up_cnt, e_up_cnt;
  logic              overflow, e_overflow;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  general_pe #(.ITEM_W(ITEM_W), .CNT_W(CNT_W)) dut (
    .clk, .rst, .in_kind, .in_item, .sib_kind, .sib_item, .chd_kind, .chd_item,
    .n_right, .n_bottom, .up_cnt, .overflow
  );

  general_pe #(.ITEM_W(ITEM_W), .CNT_W(CNT_W), .HAS_SIB(1'b0), .HAS_CHILD(1'b0)) edge_pe (
    .clk, .rst, .in_kind, .in_item,
    .sib_kind(e_sib_kind), .sib_item(e_sib_item),
    .chd_kind(e_chd_kind), .chd_item(e_chd_item),
    .n_right, .n_bottom, .up_cnt(e_up_cnt), .overflow(e_overflow)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Present one message for one clock, then check where it went.
  // exp_s / exp_c: 1 if the message must appear on the sibling / child link.
  task automatic msg(input msg_kind_e k, input int item, input bit exp_s, input bit exp_c);
    in_kind = k;
    in_item = ITEM_W'(item);
    @(posedge clk);
    #1;
    in_kind = MSG_NONE;
    in_item = '0;
    check(exp_s ? (sib_kind == k && (k != MSG_ITEM || int'(sib_item) == item)) : sib_kind == MSG_NONE,
          $sformatf("%s %0d: sibling link %s, expected %0b", k.name(), item, sib_kind.name(), exp_s));
    check(exp_c ? (chd_kind == k && (k != MSG_ITEM || int'(chd_item) == item)) : chd_kind == MSG_NONE,
          $sformatf("%s %0d: child link %s, expected %0b", k.name(), item, chd_kind.name(), exp_c));
    check(e_sib_kind == MSG_NONE && e_chd_kind == MSG_NONE, "edge PE must never drive a missing link");
  endtask

  task automatic state(input bit full, input int item, input int count);
    check(dut.full_q == full && (!full || (int'(dut.item_q) == item && int'(dut.count_q) == count)),
          $sformatf("PE holds full=%0b %0d:%0d, expected full=%0b %0d:%0d",
                    dut.full_q, dut.item_q, dut.count_q, full, item, count));
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_kind  = MSG_NONE;
    in_item  = '0;
    n_right  = '0;
    n_bottom = '0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;

    // ---------------- WRITE mode ----------------
    msg(MSG_CLEAR, 0, 1, 1);
    state(0, 0, 0);
    msg(MSG_TXN, 0, 1, 1);
    msg(MSG_ITEM, 5, 0, 0);           // step 1: store
    state(1, 5, 1);
    check(!e_overflow, "edge PE stores its first item without overflow");
    msg(MSG_ITEM, 7, 0, 1);           // step 4: in path -> child
    check(e_overflow, "edge PE overflows when an in-path item needs a child");
    state(1, 5, 1);
    msg(MSG_TXN, 0, 1, 1);
    msg(MSG_ITEM, 5, 0, 0);           // step 2: count++
    state(1, 5, 2);
    msg(MSG_TXN, 0, 1, 1);
    msg(MSG_ITEM, 3, 1, 0);           // step 3: not in path -> sibling
    check(e_overflow, "edge PE overflows when an item needs a sibling");
    check(!dut.inpath_q, "InPath cleared by step 3");
    msg(MSG_ITEM, 5, 1, 0);           // equal, but InPath clear -> sibling
    state(1, 5, 2);
    msg(MSG_TXN, 0, 1, 1);
    msg(MSG_ITEM, 5, 0, 0);
    state(1, 5, 3);
    check(!overflow, "PE with both neighbours never overflows");

    // ---------------- SCAN mode ----------------
    msg(MSG_SCAN, 0, 1, 1);
    check(dut.door_q && !dut.isleaf_q, "SCAN opens the door and clears IsLeaf");
    msg(MSG_ITEM, 2, 1, 0);           // step 3: smaller -> close door
    check(!dut.door_q, "door closed by a smaller item");
    msg(MSG_ITEM, 5, 1, 0);           // equal behind closed door
    check(!dut.isleaf_q, "no IsLeaf behind a closed door");
    msg(MSG_ITEM, 7, 1, 0);           // larger, door closed -> sibling only
    msg(MSG_SCAN, 0, 1, 1);
    msg(MSG_ITEM, 5, 1, 0);           // step 2: match
    check(dut.isleaf_q, "IsLeaf set on a match");
    msg(MSG_ITEM, 9, 1, 1);           // step 4: larger, door open
    check(!dut.isleaf_q, "IsLeaf cleared by a larger item");
    msg(MSG_SCAN, 0, 1, 1);
    msg(MSG_ITEM, 1, 1, 0);
    msg(MSG_ITEM, 5, 1, 0);
    msg(MSG_SCAN, 0, 1, 1);
    msg(MSG_ITEM, 5, 1, 0);
    check(dut.isleaf_q, "IsLeaf set again for a one-item candidate");

    // ---------------- COUNT mode ----------------
    n_right  = 20'd3;
    n_bottom = 20'd4;
    msg(MSG_COUNT, 0, 1, 1);
    check(up_cnt == 20'd7, $sformatf("COUNT cycle 0: up=%0d, expected 7", up_cnt));
    @(posedge clk);
    #1;
    check(up_cnt == 20'd10, $sformatf("COUNT cycle 1: up=%0d, expected 3+4+3", up_cnt));
    @(posedge clk);
    #1;
    check(up_cnt == 20'd7, $sformatf("COUNT cycle 2: up=%0d, expected 7 (Sent)", up_cnt));
    n_right = 20'd0;
    @(posedge clk);
    #1;
    check(up_cnt == 20'd4, $sformatf("COUNT cycle 3: up=%0d, expected 4", up_cnt));
    msg(MSG_ITEM, 5, 0, 0);           // items are dropped in COUNT mode
    n_bottom = '0;

    // ---------------- empty PE in SCAN mode ----------------
    msg(MSG_CLEAR, 0, 1, 1);
    state(0, 0, 0);
    msg(MSG_SCAN, 0, 1, 1);
    msg(MSG_ITEM, 4, 0, 0);           // step 1: stop
    msg(MSG_COUNT, 0, 1, 1);
    repeat (2) begin
      @(posedge clk);
      #1;
      check(up_cnt == '0, "empty PE reports nothing");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
