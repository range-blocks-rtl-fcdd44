// ix_tree_pkg: a fixed three-level B+tree used as test data for the index
// cache and the walker. Fan-out 8 (7 separators) at every level:
//   root (level 0, address 0x1000) covers keys [0, 4095]
//   inner node i (level 1, address 0x2000+i) covers [512*i, 512*i+511]
//   leaf j (level 2, address 0x3000+j) covers [64*j, 64*j+63]
// Separators are evenly spaced, and the pointer a leaf gives for key k is
// 0x100000 + k/8, so every expected answer has a closed form.
package ix_tree_pkg;
  import rblox_pkg::*;

  localparam ptr_t ROOT = 32'h1000;

  function automatic ix_node_t node_at(input ptr_t addr);
    ix_node_t n;
    int span, base, lvl, idx;
    n = '0;
    if (addr == ROOT) begin
      lvl = 0; idx = 0; span = 4096;
    end else if (addr >= 32'h3000) begin
      lvl = 2; idx = int'(addr - 32'h3000); span = 64;
    end else begin
      lvl = 1; idx = int'(addr - 32'h2000); span = 512;
    end
    base    = idx * span;
    n.lo    = key_t'(base);
    n.hi    = key_t'(base + span - 1);
    n.level = IX_LEVEL_W'(lvl);
    n.leaf  = (lvl == 2);
    n.nkeys = IX_NK_W'(IX_NKEYS);
    n.self  = addr;
    for (int i = 0; i < IX_NKEYS; i++) n.keys[i] = key_t'(base + (i + 1) * span / 8);
    for (int i = 0; i <= IX_NKEYS; i++) begin
      int child_lo;
      child_lo = base + i * span / 8;
      unique case (lvl)
        0: n.ptrs[i] = ptr_t'(32'h2000 + child_lo / 512);
        1: n.ptrs[i] = ptr_t'(32'h3000 + child_lo / 64);
        default: n.ptrs[i] = ptr_t'(32'h100000 + child_lo / 8);
      endcase
    end
    return n;
  endfunction

  function automatic ptr_t expected(input key_t k);
    return ptr_t'(32'h100000 + k / 8);
  endfunction

  function automatic ptr_t leaf_of(input key_t k);
    return ptr_t'(32'h3000 + k / 64);
  endfunction

  function automatic ptr_t inner_of(input key_t k);
    return ptr_t'(32'h2000 + k / 512);
  endfunction
endpackage
