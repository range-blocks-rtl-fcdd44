// tb_ix_child_select: child selection on every node of the test tree for
// every key it covers, against the tree's closed-form child, plus nodes with
// fewer separators in use.
module tb_ix_child_select;
  import rblox_pkg::*;
  import ix_tree_pkg::*;
  key_t key;
  ix_node_t node;
  logic [IX_NK_W-1:0] child_idx;
  ptr_t child_ptr;
  int checks = 0, failures = 0;

  ix_child_select dut (.*);

  initial begin
    // leaves
    for (int j = 0; j < 64; j += 7) begin
      node = node_at(ptr_t'(32'h3000 + j));
      for (int k = 64 * j; k < 64 * j + 64; k++) begin
        key = key_t'(k); #1;
        checks++;
        if (child_ptr !== expected(key) || child_idx !== IX_NK_W'((k % 64) / 8)) begin
          failures++; $display("FAIL leaf %0d key %0d ptr %h", j, k, child_ptr);
        end
      end
    end
    // inner nodes and root
    for (int k = 0; k < 4096; k += 5) begin
      key = key_t'(k);
      node = node_at(ROOT); #1;
      checks++;
      if (child_ptr !== inner_of(key)) begin failures++; $display("FAIL root key %0d", k); end
      node = node_at(inner_of(key)); #1;
      checks++;
      if (child_ptr !== leaf_of(key)) begin failures++; $display("FAIL inner key %0d", k); end
    end
    // a node with 3 separators in use: [10, 20, 30]
    node = '0; node.nkeys = 3;
    node.keys[0] = 10; node.keys[1] = 20; node.keys[2] = 30; node.keys[3] = 5; // stale slot ignored
    for (int i = 0; i <= IX_NKEYS; i++) node.ptrs[i] = ptr_t'(100 + i);
    key = 9;  #1; checks++; if (child_ptr !== 100) begin failures++; $display("FAIL 9"); end
    key = 10; #1; checks++; if (child_ptr !== 101) begin failures++; $display("FAIL 10"); end
    key = 29; #1; checks++; if (child_ptr !== 102) begin failures++; $display("FAIL 29"); end
    key = 99; #1; checks++; if (child_ptr !== 103) begin failures++; $display("FAIL 99"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
