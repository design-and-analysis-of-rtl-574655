// fpm_pkg -- types and helper functions shared by the systolic-tree frequent
// pattern miner.
//
// Every link that runs down the tree (control PE -> leftmost child, PE ->
// leftmost child, PE -> right sibling) carries one message per clock: either
// an item or a control signal. Control signals travel the same links as the
// items, one hop per cycle, so a control signal always reaches a PE after
// every item that was sent before it and before every item sent after it.
// The four control signals follow the three PE modes of the design (WRITE,
// SCAN, COUNT) plus a CLEAR that empties the tree before a new projected
// database is loaded; CLEAR and the message encoding are this design's own
// choice.
//
// Tree geometry helpers: the general PEs are numbered level by level, left to
// right, starting at 0 for the leftmost PE of level 1 (PE1 in the usual
// drawing). Level l (1..W) holds K**l PEs.
package fpm_pkg;

  typedef enum logic [2:0] {
    MSG_NONE  = 3'd0,  // idle link
    MSG_ITEM  = 3'd1,  // an item of a transaction or of a candidate item set
    MSG_TXN   = 3'd2,  // WRITE mode: end of the previous transaction, start of a new one
    MSG_SCAN  = 3'd3,  // SCAN mode: start of a new candidate item set
    MSG_COUNT = 3'd4,  // COUNT mode: report the support of the candidate just scanned
    MSG_CLEAR = 3'd5   // empty every PE (new projected database)
  } msg_kind_e;

  // Mode a PE is in; set by the last control signal it received.
  typedef enum logic [1:0] {
    MODE_WRITE = 2'd0,
    MODE_SCAN  = 2'd1,
    MODE_COUNT = 2'd2
  } pe_mode_e;

  // Which branch of the WRITE (Algorithm 1 style) or SCAN (Algorithm 2
  // style) step a PE takes for the item it receives this cycle.
  typedef enum logic [3:0] {
    STEP_IDLE      = 4'd0,  // no item this cycle, or an item in COUNT mode
    STEP_W_STORE   = 4'd1,  // WRITE (1): empty PE stores the item
    STEP_W_MATCH   = 4'd2,  // WRITE (2): item already here and PE in path: count++
    STEP_W_SIBLING = 4'd3,  // WRITE (3): PE not in path: pass to right sibling
    STEP_W_CHILD   = 4'd4,  // WRITE (4): PE in path: pass to leftmost child
    STEP_S_EMPTY   = 4'd5,  // SCAN (1): empty PE stops the item
    STEP_S_MATCH   = 4'd6,  // SCAN (2): item matches and bottom door open: IsLeaf
    STEP_S_LESS    = 4'd7,  // SCAN (3): item smaller: close bottom door
    STEP_S_GREATER = 4'd8,  // SCAN (4): item larger: to sibling, and child if door open
    STEP_S_LOCKED  = 4'd9   // SCAN: item matches but bottom door closed: to sibling only
  } pe_step_e;

  // Number of general PEs on level l of a K-ary tree.
  function automatic int level_size(input int k, input int l);
    int s;
    s = 1;
    for (int i = 0; i < l; i++) s = s * k;
    return s;
  endfunction

  // Index of the first PE of level l (levels start at 1).
  function automatic int level_base(input int k, input int l);
    int b;
    b = 0;
    for (int i = 1; i < l; i++) b = b + level_size(k, i);
    return b;
  endfunction

  // Number of general PEs of a K-ary tree with W levels (Property 2 minus the
  // control PE).
  function automatic int num_pes(input int k, input int w);
    return level_base(k, w + 1);
  endfunction

endpackage
