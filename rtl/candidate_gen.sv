// candidate_gen -- hardware candidate generation and matching sequencer.
//
// After a projected database with n_items frequent items has been loaded
// into the systolic tree, this block mines it without host help: it walks
// through every non-empty subset of the items (bit mask 1 .. 2**n_items-1),
// sends each subset to the tree as a candidate item set (MSG_SCAN, the items
// in increasing order, then MSG_COUNT), waits for the support that the
// control PE returns, and compares it with the minimum support `threshold`.
// A candidate whose support is at least the threshold is reported on
// pat_valid / pat_mask / pat_support for one clock. `done` pulses once after
// the last candidate.
//
// The document states that candidates are generated and matched in hardware
// and that a candidate is frequent when its support is no less than the
// threshold. How they are enumerated is this design's own choice: the
// simplest exhaustive order (binary counting over the item mask), no
// pruning, one candidate in the tree at a time. The projected database's
// items are expected as item numbers 0 .. n_items-1, in the order in which
// the items of each transaction were sent.
//
// Timing per candidate: 1 clock for MSG_SCAN, N clocks to walk the item mask
// (an idle link for an absent item), 1 clock for MSG_COUNT, then the tree's
// collection latency, then 1 clock to decide.
module candidate_gen
  import fpm_pkg::*;
#(
  parameter int unsigned ITEM_W = 8,
  parameter int unsigned CNT_W  = 20,
  parameter int unsigned N      = 4
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic [$clog2(N+1)-1:0] n_items,
  input  logic [CNT_W-1:0]       threshold,
  output logic                   busy,
  output logic                   done,
  // to the control PE
  output msg_kind_e              out_kind,
  output logic [ITEM_W-1:0]      out_item,
  input  logic [CNT_W-1:0]       support,
  input  logic                   support_valid,
  // frequent patterns
  output logic                   pat_valid,
  output logic [N-1:0]           pat_mask,
  output logic [CNT_W-1:0]       pat_support
);

  typedef enum logic [2:0] {
    S_IDLE, S_SCAN, S_ITEMS, S_COUNT, S_WAIT, S_NEXT
  } state_e;

  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1;

  state_e           state_q;
  logic [N:0]       mask_q;      // one bit wider so 2**N fits
  logic [N:0]       last_q;      // 2**n_items - 1
  logic [IDX_W-1:0] idx_q;
  logic [CNT_W-1:0] sup_q;
  logic [N-1:0]     cand;        // current candidate item set

  assign cand = mask_q[N-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q     <= S_IDLE;
      mask_q      <= '0;
      last_q      <= '0;
      idx_q       <= '0;
      sup_q       <= '0;
      done        <= 1'b0;
      pat_valid   <= 1'b0;
      pat_mask    <= '0;
      pat_support <= '0;
    end else begin
      done      <= 1'b0;
      pat_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          if (n_items == '0) begin
            done <= 1'b1;
          end else begin
            mask_q  <= (N+1)'(1);
            last_q  <= ((N+1)'(1) << n_items) - (N+1)'(1);
            state_q <= S_SCAN;
          end
        end
        S_SCAN: begin
          idx_q   <= '0;
          state_q <= S_ITEMS;
        end
        S_ITEMS: begin
          if (idx_q == IDX_W'(N - 1)) state_q <= S_COUNT;
          else                        idx_q   <= idx_q + IDX_W'(1);
        end
        S_COUNT: state_q <= S_WAIT;
        S_WAIT: if (support_valid) begin
          sup_q   <= support;
          state_q <= S_NEXT;
        end
        S_NEXT: begin
          if (sup_q >= threshold) begin
            pat_valid   <= 1'b1;
            pat_mask    <= cand;
            pat_support <= sup_q;
          end
          if (mask_q == last_q) begin
            done    <= 1'b1;
            state_q <= S_IDLE;
          end else begin
            mask_q  <= mask_q + (N+1)'(1);
            state_q <= S_SCAN;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    out_kind = MSG_NONE;
    out_item = '0;
    unique case (state_q)
      S_SCAN:  out_kind = MSG_SCAN;
      S_ITEMS: if (cand[idx_q]) begin
        out_kind = MSG_ITEM;
        out_item = ITEM_W'(idx_q);
      end
      S_COUNT: out_kind = MSG_COUNT;
      default: ;
    endcase
  end

  assign busy = (state_q != S_IDLE);

endmodule
