// systolic_tree -- control PE plus a K-ary tree of W levels of general PEs.
//
// Each PE is wired only to its leftmost child and to its right sibling; the
// other children of a PE reach it through their left siblings. Messages
// (items and control signals) move down and right, one hop per clock; counts
// move up and left on the same links in COUNT mode. The tree has
// K + K**2 + ... + K**W general PEs and one control PE. PEs are numbered
// level by level, left to right (PE1 of the usual drawing is index 0 here).
//
// The document sizes the tree by K (children per PE) and W (levels) and
// presents K = W = 4 as the size it ran; the default here is the same. A
// tree with K >= N and W >= N holds any database of N frequent items.
//
// Interface: one message per clock on in_kind/in_item; support_valid pulses
// with the support of the last scanned candidate 2*K*W+2 clocks after its
// MSG_COUNT was given; busy is high while the support is being collected;
// overflow (sticky until MSG_CLEAR) reports that a transaction did not fit.
module systolic_tree
  import fpm_pkg::*;
#(
  parameter int unsigned ITEM_W = 8,
  parameter int unsigned CNT_W  = 20,
  parameter int unsigned K      = 4,
  parameter int unsigned W      = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  msg_kind_e         in_kind,
  input  logic [ITEM_W-1:0] in_item,
  output logic [CNT_W-1:0]  support,
  output logic              support_valid,
  output logic              busy,
  output logic              overflow
);

  localparam int NPE = num_pes(K, W);

  msg_kind_e         sib_kind [NPE];
  logic [ITEM_W-1:0] sib_item [NPE];
  msg_kind_e         chd_kind [NPE];
  logic [ITEM_W-1:0] chd_item [NPE];
  logic [CNT_W-1:0]  up_cnt   [NPE];
  logic [NPE-1:0]    pe_ovf;

  msg_kind_e         root_kind;
  logic [ITEM_W-1:0] root_item;

  control_pe #(.ITEM_W(ITEM_W), .CNT_W(CNT_W), .K(K), .W(W)) u_ctrl (
    .clk, .rst,
    .in_kind, .in_item,
    .support, .support_valid, .busy, .overflow,
    .chd_kind     (root_kind),
    .chd_item     (root_item),
    .n_bottom     (up_cnt[0]),
    .tree_overflow(|pe_ovf)
  );

  for (genvar l = 1; l <= W; l++) begin : g_lvl
    for (genvar j = 0; j < level_size(K, l); j++) begin : g_pe
      localparam int  G         = level_base(K, l) + j;
      localparam bit  LEFTMOST  = (j % K) == 0;
      localparam bit  HAS_SIB   = (j % K) != (K - 1);
      localparam bit  HAS_CHILD = l < W;
      localparam int  PARENT    = (l > 1) ? level_base(K, l - 1) + j / K : 0;
      localparam int  SIB       = HAS_SIB ? G + 1 : G;
      localparam int  CHILD     = HAS_CHILD ? level_base(K, l + 1) + j * K : G;

      msg_kind_e         in_k;
      logic [ITEM_W-1:0] in_i;
      logic [CNT_W-1:0]  n_r, n_b;

      if (!LEFTMOST) begin : g_from_sib
        assign in_k = sib_kind[G-1];
        assign in_i = sib_item[G-1];
      end else if (l == 1) begin : g_from_root
        assign in_k = root_kind;
        assign in_i = root_item;
      end else begin : g_from_parent
        assign in_k = chd_kind[PARENT];
        assign in_i = chd_item[PARENT];
      end

      assign n_r = HAS_SIB   ? up_cnt[SIB]   : '0;
      assign n_b = HAS_CHILD ? up_cnt[CHILD] : '0;

      general_pe #(
        .ITEM_W(ITEM_W), .CNT_W(CNT_W), .HAS_SIB(HAS_SIB), .HAS_CHILD(HAS_CHILD)
      ) u_pe (
        .clk, .rst,
        .in_kind (in_k),
        .in_item (in_i),
        .sib_kind(sib_kind[G]),
        .sib_item(sib_item[G]),
        .chd_kind(chd_kind[G]),
        .chd_item(chd_item[G]),
        .n_right (n_r),
        .n_bottom(n_b),
        .up_cnt  (up_cnt[G]),
        .overflow(pe_ovf[G])
      );
    end
  end

endmodule
