// control_pe -- root PE of the systolic tree, its only input/output port.
//
// The control PE holds no item. Every item or control signal given to the
// tree enters here and is passed, one clock later, to the leftmost PE of
// level 1; the control signal is thereby broadcast through the tree hop by
// hop, ahead of the items that follow it. In COUNT mode the control PE adds
// up the counts that arrive from its leftmost child and outputs the total as
// the support of the candidate item set just scanned.
//
// The document gives the control PE's role (interface, forwarding, adding up
// the counts). The collection window is this design's own: the farthest PE
// of a K-ary, W-level tree is K*W hops away, so a count injected there
// reaches the control PE 2*K*W+1 cycles after the COUNT signal entered.
// The control PE therefore sums its input for DRAIN = 2*K*W+1 cycles after a
// MSG_COUNT and then pulses `support_valid` with the total in `support`
// (2*K*W+2 cycles after the MSG_COUNT was presented). `busy` is high while it
// collects; a new MSG_COUNT during that time restarts the collection.
// An assertion checks that the items between two control signals arrive in
// increasing order, which the PE rules rely on.
// `overflow` is sticky: it is set when any general PE lost a WRITE item and
// is cleared by MSG_CLEAR.
module control_pe
  import fpm_pkg::*;
#(
  parameter int unsigned ITEM_W = 8,
  parameter int unsigned CNT_W  = 20,
  parameter int unsigned K      = 4,
  parameter int unsigned W      = 4
) (
  input  logic              clk,
  input  logic              rst,
  // host side
  input  msg_kind_e         in_kind,
  input  logic [ITEM_W-1:0] in_item,
  output logic [CNT_W-1:0]  support,
  output logic              support_valid,
  output logic              busy,
  output logic              overflow,
  // tree side
  output msg_kind_e         chd_kind,
  output logic [ITEM_W-1:0] chd_item,
  input  logic [CNT_W-1:0]  n_bottom,
  input  logic              tree_overflow
);

  localparam int unsigned DRAIN   = 2 * K * W + 1;
  localparam int unsigned TIMER_W = $clog2(DRAIN + 1);

  logic [TIMER_W-1:0] timer_q;
  logic [CNT_W-1:0]   acc_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      chd_kind <= MSG_NONE;
      chd_item <= '0;
    end else begin
      chd_kind <= in_kind;
      chd_item <= in_item;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      timer_q       <= '0;
      acc_q         <= '0;
      support_valid <= 1'b0;
    end else if (in_kind == MSG_COUNT) begin
      timer_q       <= TIMER_W'(DRAIN);
      acc_q         <= '0;
      support_valid <= 1'b0;
    end else if (timer_q != '0) begin
      timer_q       <= timer_q - TIMER_W'(1);
      acc_q         <= acc_q + n_bottom;
      support_valid <= (timer_q == TIMER_W'(1));
    end else begin
      support_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || in_kind == MSG_CLEAR) overflow <= 1'b0;
    else if (tree_overflow)          overflow <= 1'b1;
  end

  // Host rule: the items of one transaction or candidate (between two
  // control signals) arrive in strictly increasing order; the WRITE and SCAN
  // rules of the PEs depend on it.
  logic              seen_q;
  logic [ITEM_W-1:0] last_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      seen_q <= 1'b0;
      last_q <= '0;
    end else if (in_kind == MSG_ITEM) begin
      assert (!seen_q || in_item > last_q)
        else $error("item %0d does not follow item %0d in increasing order", in_item, last_q);
      seen_q <= 1'b1;
      last_q <= in_item;
    end else if (in_kind != MSG_NONE) begin
      seen_q <= 1'b0;
    end
  end

  assign support = acc_q;
  assign busy    = (timer_q != '0);

endmodule
