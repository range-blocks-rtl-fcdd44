// ix_child_select: picks the child pointer an index node gives for a key.
//
// The node's sorted separator keys are all compared with the key in parallel
// (keys[i] <= key); the child index is the position of the first separator
// greater than the key, i.e. the number of separators in use that are <= key.
// Child i then holds keys[i-1] <= k < keys[i]. This is the third stage of
// the index cache's hit path and the search step of the walker.
// Purely combinational.
module ix_child_select
  import rblox_pkg::*;
(
  input  key_t     key,
  input  ix_node_t node,
  output logic [IX_NK_W-1:0] child_idx,
  output ptr_t     child_ptr
);
  logic [IX_NKEYS-1:0] le;

  always_comb begin
    for (int i = 0; i < IX_NKEYS; i++)
      le[i] = (IX_NK_W'(i) < node.nkeys) && (node.keys[i] <= key);
    // separators are sorted, so le is a run of ones from bit 0: the child is
    // the first zero
    child_idx = IX_NK_W'(IX_NKEYS);
    for (int i = IX_NKEYS - 1; i >= 0; i--)
      if (!le[i]) child_idx = IX_NK_W'(i);
    child_ptr = node.ptrs[child_idx];
  end
endmodule
