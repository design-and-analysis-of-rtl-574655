// fpm_top -- FPGA side of a hardware/software frequent pattern miner built
// around a systolic tree.
//
// The host projects a large transaction database into small sub-databases
// of at most N = min(K, W) frequent items each and sends one at a time to
// this block. Loading: the host sends MSG_CLEAR, then for every transaction
// MSG_TXN followed by its items in increasing item order, one message per
// clock on host_kind/host_item; the tree is built as the items stream in
// (WRITE mode). Mining: the host pulses mine_start with the number of items
// of the sub-database and the minimum support; candidate_gen then scans
// every candidate item set (SCAN mode), collects its support (COUNT mode)
// and reports each frequent one on pat_valid/pat_mask/pat_support, bit i of
// pat_mask standing for item i. mine_done pulses at the end.
//
// The host may also run SCAN/COUNT itself through host_kind/host_item and
// read each support on support/support_valid, comparing it with the
// threshold in software; count_busy is high while a support is being
// collected, and neither the host nor mine_start should start a new scan
// then; host messages are ignored while host_ready is low
// (candidate_gen driving the tree). overflow reports that a transaction did
// not fit in the tree (more items than W, or more distinct children than K).
//
// The split between host and hardware and the three tree modes follow the
// document; the message-based host port, the ready signal and the overflow
// flag are this design's own.
module fpm_top
  import fpm_pkg::*;
#(
  parameter int unsigned ITEM_W = 8,
  parameter int unsigned CNT_W  = 20,
  parameter int unsigned K      = 4,
  parameter int unsigned W      = 4,
  localparam int unsigned N     = (K < W) ? K : W
) (
  input  logic                   clk,
  input  logic                   rst,
  // host message port
  input  msg_kind_e              host_kind,
  input  logic [ITEM_W-1:0]      host_item,
  output logic                   host_ready,
  output logic [CNT_W-1:0]       support,
  output logic                   support_valid,
  output logic                   count_busy,
  output logic                   overflow,
  // hardware mining
  input  logic                   mine_start,
  input  logic [$clog2(N+1)-1:0] n_items,
  input  logic [CNT_W-1:0]       threshold,
  output logic                   mine_done,
  output logic                   pat_valid,
  output logic [N-1:0]           pat_mask,
  output logic [CNT_W-1:0]       pat_support
);

  msg_kind_e         gen_kind, tree_kind;
  logic [ITEM_W-1:0] gen_item, tree_item;
  logic              gen_busy;

  candidate_gen #(.ITEM_W(ITEM_W), .CNT_W(CNT_W), .N(N)) u_gen (
    .clk, .rst,
    .start        (mine_start),
    .n_items,
    .threshold,
    .busy         (gen_busy),
    .done         (mine_done),
    .out_kind     (gen_kind),
    .out_item     (gen_item),
    .support,
    .support_valid,
    .pat_valid,
    .pat_mask,
    .pat_support
  );

  assign host_ready = !gen_busy;
  assign tree_kind  = gen_busy ? gen_kind : host_kind;
  assign tree_item  = gen_busy ? gen_item : host_item;

  systolic_tree #(.ITEM_W(ITEM_W), .CNT_W(CNT_W), .K(K), .W(W)) u_tree (
    .clk, .rst,
    .in_kind      (tree_kind),
    .in_item      (tree_item),
    .support,
    .support_valid,
    .busy         (count_busy),
    .overflow
  );

endmodule
