// general_pe -- one general processing element of the systolic tree.
//
// A general PE holds at most one item and the support count of the path that
// ends in it. It has one input link, which comes from its parent if it is a
// leftmost child and from its left sibling otherwise, and two output links:
// the "bottom door" to its leftmost child and the "right door" to its right
// sibling. Counts flow the opposite way: the PE receives N_Right from its
// right sibling and N_Bottom from its leftmost child and sends a sum back on
// its input link's direction.
//
// Behaviour per received item, by mode:
//  * WRITE (tree creation): (1) an empty PE stores the item with count 1 and
//    sets match; (2) a PE holding the item while InPath is set increments its
//    count and sets match; (3) a PE without match clears InPath and passes the
//    item to its sibling; (4) otherwise (PE on the transaction's path) the
//    item goes to the leftmost child.
//  * SCAN (candidate matching): (1) an empty PE stops the item; (2) equal item
//    and open bottom door sets IsLeaf; (3) a smaller item clears IsLeaf and
//    closes the bottom door; (4) a larger item clears IsLeaf and also goes to
//    the child if the bottom door is open. In every case except (1) the item
//    goes on to the sibling (the right door is always open).
//  * COUNT: each cycle the PE sends N_Right + N_Bottom towards its parent,
//    plus, once (Sent flag), its own count if IsLeaf is set.
// Control signals (MSG_TXN, MSG_SCAN, MSG_COUNT, MSG_CLEAR) set the mode,
// reinitialise the flags and are broadcast on both doors.
//
// All of the above follows the document's three mode algorithms. This
// design's own choices: an equal item arriving at a PE whose bottom door is
// closed only passes to the sibling and leaves IsLeaf clear (the case is not
// listed among the four steps); items arriving in COUNT mode are dropped;
// CLEAR empties the PE; reset is synchronous and active high. A WRITE item
// that must leave through a door with no PE behind it (HAS_SIB / HAS_CHILD
// clear) is lost, and the PE raises `overflow` for one cycle.
//
// Timing: the input message is processed in the cycle it is presented;
// both output links and the upward count are registered, so each hop costs
// one clock in either direction.
module general_pe
  import fpm_pkg::*;
#(
  parameter int unsigned ITEM_W    = 8,
  parameter int unsigned CNT_W     = 20,
  parameter bit          HAS_SIB   = 1'b1,
  parameter bit          HAS_CHILD = 1'b1
) (
  input  logic              clk,
  input  logic              rst,
  // input link (from parent or left sibling)
  input  msg_kind_e         in_kind,
  input  logic [ITEM_W-1:0] in_item,
  // right door
  output msg_kind_e         sib_kind,
  output logic [ITEM_W-1:0] sib_item,
  // bottom door
  output msg_kind_e         chd_kind,
  output logic [ITEM_W-1:0] chd_item,
  // COUNT mode
  input  logic [CNT_W-1:0]  n_right,
  input  logic [CNT_W-1:0]  n_bottom,
  output logic [CNT_W-1:0]  up_cnt,
  // a WRITE item was pushed out of the tree
  output logic              overflow
);

  pe_mode_e          mode_q;
  logic              full_q;
  logic [ITEM_W-1:0] item_q;
  logic [CNT_W-1:0]  count_q;
  logic              match_q, inpath_q;   // WRITE mode flags
  logic              door_q, isleaf_q;    // SCAN mode flags
  logic              sent_q;              // COUNT mode flag

  pe_step_e step;
  logic     fwd_sib, fwd_chd;
  logic     is_ctrl;

  assign is_ctrl = (in_kind == MSG_TXN) || (in_kind == MSG_SCAN) ||
                   (in_kind == MSG_COUNT) || (in_kind == MSG_CLEAR);

  // Decide the algorithm step for an incoming item.
  always_comb begin
    step = STEP_IDLE;
    if (in_kind == MSG_ITEM) begin
      unique case (mode_q)
        MODE_WRITE: begin
          if (!full_q)                           step = STEP_W_STORE;
          else if (in_item == item_q && inpath_q) step = STEP_W_MATCH;
          else if (!match_q)                     step = STEP_W_SIBLING;
          else                                   step = STEP_W_CHILD;
        end
        MODE_SCAN: begin
          if (!full_q)                           step = STEP_S_EMPTY;
          else if (in_item == item_q && door_q)  step = STEP_S_MATCH;
          else if (in_item < item_q)             step = STEP_S_LESS;
          else if (in_item > item_q)             step = STEP_S_GREATER;
          else                                   step = STEP_S_LOCKED;
        end
        default: step = STEP_IDLE;
      endcase
    end
  end

  always_comb begin
    fwd_sib = 1'b0;
    fwd_chd = 1'b0;
    unique case (step)
      STEP_W_SIBLING: fwd_sib = 1'b1;
      STEP_W_CHILD:   fwd_chd = 1'b1;
      STEP_S_MATCH, STEP_S_LESS, STEP_S_LOCKED: fwd_sib = 1'b1;
      STEP_S_GREATER: begin
        fwd_sib = 1'b1;
        fwd_chd = door_q;
      end
      default: ;
    endcase
  end

  // Flags and stored item.
  always_ff @(posedge clk) begin
    if (rst) begin
      mode_q   <= MODE_WRITE;
      full_q   <= 1'b0;
      item_q   <= '0;
      count_q  <= '0;
      match_q  <= 1'b0;
      inpath_q <= 1'b1;
      door_q   <= 1'b1;
      isleaf_q <= 1'b0;
      sent_q   <= 1'b1;
    end else begin
      unique case (in_kind)
        MSG_CLEAR: begin
          mode_q   <= MODE_WRITE;
          full_q   <= 1'b0;
          count_q  <= '0;
          match_q  <= 1'b0;
          inpath_q <= 1'b1;
          isleaf_q <= 1'b0;
          sent_q   <= 1'b1;
        end
        MSG_TXN: begin
          mode_q   <= MODE_WRITE;
          match_q  <= 1'b0;
          inpath_q <= 1'b1;
        end
        MSG_SCAN: begin
          mode_q   <= MODE_SCAN;
          door_q   <= 1'b1;
          isleaf_q <= 1'b0;
        end
        MSG_COUNT: begin
          mode_q <= MODE_COUNT;
          sent_q <= 1'b0;
        end
        default: ;
      endcase

      unique case (step)
        STEP_W_STORE: begin
          full_q  <= 1'b1;
          item_q  <= in_item;
          count_q <= CNT_W'(1);
          match_q <= 1'b1;
        end
        STEP_W_MATCH: begin
          count_q <= count_q + CNT_W'(1);
          match_q <= 1'b1;
        end
        STEP_W_SIBLING: inpath_q <= 1'b0;
        STEP_S_MATCH:   isleaf_q <= 1'b1;
        STEP_S_LESS: begin
          isleaf_q <= 1'b0;
          door_q   <= 1'b0;
        end
        STEP_S_GREATER, STEP_S_LOCKED: isleaf_q <= 1'b0;
        default: ;
      endcase

      if (mode_q == MODE_COUNT && in_kind != MSG_COUNT) sent_q <= 1'b1;
    end
  end

  // Output links: control signals are broadcast on both doors, items go
  // where the step sends them.
  always_ff @(posedge clk) begin
    if (rst) begin
      sib_kind <= MSG_NONE;
      chd_kind <= MSG_NONE;
      sib_item <= '0;
      chd_item <= '0;
      overflow <= 1'b0;
    end else begin
      sib_kind <= (HAS_SIB && (is_ctrl || fwd_sib)) ? in_kind : MSG_NONE;
      chd_kind <= (HAS_CHILD && (is_ctrl || fwd_chd)) ? in_kind : MSG_NONE;
      sib_item <= in_item;
      chd_item <= in_item;
      overflow <= (mode_q == MODE_WRITE) &&
                  ((fwd_sib && !HAS_SIB) || (fwd_chd && !HAS_CHILD));
    end
  end

  // COUNT mode (Algorithm 3 style): N_Child = N_Right + N_Bottom, plus the
  // local count once if this PE is a reporting PE.
  always_ff @(posedge clk) begin
    if (rst) begin
      up_cnt <= '0;
    end else if (mode_q == MODE_COUNT && in_kind != MSG_COUNT &&
                 !sent_q && isleaf_q && full_q) begin
      up_cnt <= n_right + n_bottom + count_q;
    end else begin
      up_cnt <= n_right + n_bottom;
    end
  end

endmodule
