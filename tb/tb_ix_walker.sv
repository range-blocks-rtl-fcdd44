// tb_ix_walker: walks over the test tree with a memory that answers each
// read after a random 3..20 clocks, out of order. Walks start at the root
// (3 node reads), at an inner node (2) or at a leaf (1). Checks every
// result's pointer and node count, that each refill carries the node read,
// and that several walks were waiting on memory at once.
module tb_ix_walker;
  import rblox_pkg::*;
  import ix_tree_pkg::*;
  localparam int NCTX = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic walk_valid, walk_ready; key_t walk_key; ptr_t walk_ptr; logic [7:0] walk_id;
  logic mem_req_valid, mem_req_ready; ptr_t mem_req_addr; logic [1:0] mem_req_tag;
  logic mem_resp_valid; logic [1:0] mem_resp_tag; ix_node_t mem_resp_node;
  logic fill_valid, fill_ready; ix_node_t fill_node;
  logic res_valid, res_ready; logic [7:0] res_id; key_t res_key; ptr_t res_ptr; logic [7:0] res_nodes;
  int checks = 0, failures = 0;

  ix_walker #(.NCTX(NCTX), .ID_W(8)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // memory model: one slot per tag, answer after a random delay
  int   due  [NCTX];
  ptr_t addr [NCTX];
  int   now = 0, max_wait = 0, n_fill = 0;
  always @(negedge clk) begin
    int w;
    now++;
    mem_resp_valid = 0;
    for (int t = 0; t < NCTX; t++) if (due[t] > 0 && now >= due[t] && !mem_resp_valid) begin
      mem_resp_valid = 1; mem_resp_tag = 2'(t); mem_resp_node = node_at(addr[t]); due[t] = 0;
    end
    w = 0;
    for (int t = 0; t < NCTX; t++) if (due[t] > 0) w++;
    if (w > max_wait) max_wait = w;
  end
  always @(posedge clk) if (rst_n && mem_req_valid && mem_req_ready) begin
    due[mem_req_tag]  <= now + $urandom_range(3, 20);
    addr[mem_req_tag] <= mem_req_addr;
  end
  always @(posedge clk) if (rst_n && fill_valid) begin
    n_fill <= n_fill + 1;
    chk(fill_node == node_at(fill_node.self), "refill carries the node read");
  end

  // expected results per id
  key_t exp_key [256];
  int   exp_nodes [256];
  int   n_done = 0;
  always @(negedge clk) begin
    #1;
    if (rst_n && res_valid && res_ready) begin
      chk(res_key == exp_key[res_id] && res_ptr == expected(res_key) && int'(res_nodes) == exp_nodes[res_id],
          $sformatf("walk %0d key %0d ptr %h nodes %0d", res_id, res_key, res_ptr, res_nodes));
      n_done++;
    end
  end

  initial begin
    for (int t = 0; t < NCTX; t++) due[t] = 0;
    walk_valid = 0; walk_key = 0; walk_ptr = 0; walk_id = 0;
    mem_req_ready = 1; mem_resp_valid = 0; mem_resp_tag = 0; mem_resp_node = '0;
    fill_ready = 1; res_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      key_t k; int kind;
      k = key_t'($urandom_range(0, 4095));
      kind = $urandom_range(0, 2);
      @(negedge clk);
      walk_valid = 1; walk_key = k; walk_id = 8'(i);
      walk_ptr = (kind == 0) ? ROOT : (kind == 1) ? inner_of(k) : leaf_of(k);
      exp_key[i] = k; exp_nodes[i] = 3 - kind;
      mem_req_ready = ($urandom_range(0, 4) != 0);
      #1;
      while (!walk_ready) begin @(negedge clk); mem_req_ready = ($urandom_range(0, 4) != 0); #1; end
      @(negedge clk);
      walk_valid = 0;
    end
    mem_req_ready = 1;
    repeat (500) @(negedge clk);
    chk(n_done == 200, $sformatf("all walks finished (%0d)", n_done));
    chk(max_wait >= 3, $sformatf("walks overlapped in memory (max %0d)", max_wait));
    chk(n_fill > 100, "refills offered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
