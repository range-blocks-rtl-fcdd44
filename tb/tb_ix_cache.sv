// tb_ix_cache: the index cache's hit path, refill and replacement with the
// test tree (4 sets x 2 ways, 256-key blocks, 5-cycle lookups).
// Checks: a miss when empty; an inner node [0,511] spans two key blocks and
// is found from both; when a leaf and its parent both match, the deeper leaf
// wins and its child pointer is the data pointer; the root (16 blocks) is
// not cached; LRU evicts the least recently used of two leaves in a set;
// every lookup takes exactly LAT clocks.
module tb_ix_cache;
  import rblox_pkg::*;
  import ix_tree_pkg::*;
  localparam int LAT = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, fill, busy, done, hit, hit_leaf;
  key_t key, hit_lo, hit_hi;
  ix_node_t fill_node;
  logic [IX_LEVEL_W-1:0] hit_level;
  ptr_t hit_self, child_ptr;
  int checks = 0, failures = 0;

  ix_cache #(.NSETS(4), .NWAYS(2), .BLOCK_BITS(8), .REPL_MAX(4), .LAT(LAT)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic do_fill(input ptr_t a, input logic exp_stored);
    @(negedge clk);
    start = 1; fill = 1; fill_node = node_at(a);
    @(negedge clk);
    start = 0; fill = 0;
    while (!done) @(negedge clk);
    chk(hit == exp_stored, $sformatf("fill %h stored=%b", a, hit));
  endtask

  task automatic look(input key_t k, input logic eh, input ptr_t eself, input ptr_t echild);
    int n;
    @(negedge clk);
    start = 1; fill = 0; key = k;
    @(negedge clk);
    start = 0; n = 1;
    while (!done) begin @(negedge clk); n++; end
    chk(n == LAT, $sformatf("lookup latency %0d", n));
    chk(hit == eh && (!eh || (hit_self == eself && child_ptr == echild)),
        $sformatf("lookup %0d: hit %b self %h child %h", k, hit, hit_self, child_ptr));
  endtask

  initial begin
    start = 0; fill = 0; key = 0; fill_node = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    look(100, 0, 0, 0);
    do_fill(32'h2000, 1);                      // [0,511], blocks 0 and 1
    look(100, 1, 32'h2000, leaf_of(100));
    look(300, 1, 32'h2000, leaf_of(300));
    look(600, 0, 0, 0);
    do_fill(32'h3001, 1);                      // leaf [64,127]
    look(100, 1, 32'h3001, expected(100));     // deeper level wins
    chk(hit_leaf && hit_level == 2 && hit_lo == 64 && hit_hi == 127, "leaf tag");
    look(30, 1, 32'h2000, leaf_of(30));        // only the parent holds 30
    do_fill(ROOT, 0);                          // too wide
    look(3000, 0, 0, 0);
    // set 0 holds [0,511] and leaf 1; leaf 0 ([0,63]) replaces the LRU one
    look(30, 1, 32'h2000, leaf_of(30));        // touch the inner node
    do_fill(32'h3000, 1);
    look(100, 1, 32'h2000, leaf_of(100));      // leaf 1 was evicted
    look(10, 1, 32'h3000, expected(10));       // leaf 0 present
    // refilling the same node does not duplicate it
    do_fill(32'h3000, 1);
    look(40, 1, 32'h3000, expected(40));
    look(300, 1, 32'h2000, leaf_of(300));      // block 1 copy still there
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
