// tb_metal_ix: lookups through the index cache and walker over the
// three-level test tree (ix_tree_pkg), against a memory that answers each
// read after a random delay.
// Phase 1 sends one lookup at a time: the first lookup of a leaf misses and
// walks from the root; a repeat hits the cached leaf and is answered without
// memory, taken LAT clocks after the lookup was (checked); a neighbour leaf under a cached inner
// node walks one node only. Phase 2 streams random lookups with random
// memory stalls and result back-pressure and checks every result pointer.
// Counts hits, misses, refills, shortened walks and leaf answers; fails if
// any is zero. Watchdog counts a failure.
`timescale 1ns/1ps
module tb_metal_ix;
  import rblox_pkg::*;
  import ix_tree_pkg::*;
  localparam int NCTX = 4;
  localparam int LAT  = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic lk_valid, lk_ready; key_t lk_key; logic [7:0] lk_id;
  logic res_valid, res_ready; logic [7:0] res_id; key_t res_key; ptr_t res_ptr;
  logic res_short; logic [7:0] res_nodes;
  logic mem_req_valid, mem_req_ready; ptr_t mem_req_addr; logic [1:0] mem_req_tag;
  logic mem_resp_valid; logic [1:0] mem_resp_tag; ix_node_t mem_resp_node;
  logic [31:0] n_hit, n_miss, n_fill;

  metal_ix #(.NSETS(64), .NWAYS(16), .BLOCK_BITS(8), .LAT(LAT), .NCTX(NCTX), .ID_W(8)) dut (
    .clk(clk), .rst_n(rst_n), .root_ptr(ROOT),
    .lk_valid(lk_valid), .lk_ready(lk_ready), .lk_key(lk_key), .lk_id(lk_id),
    .res_valid(res_valid), .res_ready(res_ready), .res_id(res_id), .res_key(res_key),
    .res_ptr(res_ptr), .res_short(res_short), .res_nodes(res_nodes),
    .mem_req_valid(mem_req_valid), .mem_req_ready(mem_req_ready), .mem_req_addr(mem_req_addr),
    .mem_req_tag(mem_req_tag), .mem_resp_valid(mem_resp_valid), .mem_resp_tag(mem_resp_tag),
    .mem_resp_node(mem_resp_node), .n_hit(n_hit), .n_miss(n_miss), .n_fill(n_fill)
  );

  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  longint now = 0;
  always @(posedge clk) now <= now + 1;

  // memory model: one slot per tag, answer after a random delay
  longint due [NCTX];
  ptr_t   addr [NCTX];
  int     n_reads = 0;
  initial for (int t = 0; t < NCTX; t++) due[t] = 0;
  always @(negedge clk) begin
    mem_resp_valid = 0;
    for (int t = 0; t < NCTX; t++) if (due[t] > 0 && now >= due[t] && !mem_resp_valid) begin
      mem_resp_valid = 1; mem_resp_tag = 2'(t); mem_resp_node = node_at(addr[t]); due[t] = 0;
    end
  end
  always @(posedge clk) if (rst_n && mem_req_valid && mem_req_ready) begin
    due[mem_req_tag]  <= now + $urandom_range(3, 20);
    addr[mem_req_tag] <= mem_req_addr;
    n_reads <= n_reads + 1;
  end

  // results
  key_t   exp_key [256];
  logic   pending [256];
  longint sent_at [256];
  int n_res = 0, n_short = 0, n_leaf_ans = 0;
  int last_lat = 0, last_nodes = 0; logic last_short = 0;
  always @(posedge clk) if (rst_n && res_valid && res_ready) begin
    chk(pending[res_id], "result for an outstanding lookup");
    chk(res_key == exp_key[res_id], "result key");
    chk(res_ptr == expected(res_key), $sformatf("result pointer for key %0d", res_key));
    pending[res_id] = 0;
    n_res++;
    if (res_short) n_short++;
    if (res_short && res_nodes == 0) n_leaf_ans++;
    last_lat = int'(now - sent_at[res_id]);
    last_nodes = int'(res_nodes); last_short = res_short;
  end

  // random memory stalls and result back-pressure in phase 2
  logic stall = 0;
  always @(negedge clk) begin
    mem_req_ready = !stall || ($urandom_range(0, 5) != 0);
    res_ready     = !stall || ($urandom_range(0, 6) != 0);
  end

  int next_id = 0;
  task automatic send(input key_t k);
    @(negedge clk);
    while (pending[next_id[7:0]]) begin @(negedge clk); end
    lk_valid = 1; lk_key = k; lk_id = next_id[7:0];
    #1;
    while (!lk_ready) begin @(negedge clk); #1; end
    exp_key[next_id[7:0]] = k; pending[next_id[7:0]] = 1; sent_at[next_id[7:0]] = now + 1;
    @(negedge clk);
    lk_valid = 0;
    next_id = (next_id + 1) % 256;
  endtask

  task automatic one(input key_t k, output int lat, output int nodes, output logic short_w);
    int n_before;
    n_before = n_res;
    send(k);
    while (n_res == n_before) @(negedge clk);
    lat = last_lat; nodes = last_nodes; short_w = last_short;
  endtask

  int lat, nodes; logic sh;
  initial begin
    for (int i = 0; i < 256; i++) pending[i] = 0;
    lk_valid = 0; lk_key = 0; lk_id = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: one lookup at a time
    one(100, lat, nodes, sh);
    chk(!sh && nodes == 3, "cold lookup walks root, inner node and leaf");
    repeat (20) @(negedge clk);       // let the refills land
    one(101, lat, nodes, sh);
    chk(sh && nodes == 0, "repeat lookup answered by the cached leaf");
    chk(lat == LAT, $sformatf("leaf answer latency %0d, expected %0d", lat, LAT));
    one(200, lat, nodes, sh);
    chk(sh && nodes == 1, "neighbour leaf found through the cached inner node");
    one(3000, lat, nodes, sh);
    chk(!sh && nodes == 3, "other branch misses");
    chk(n_hit >= 2 && n_miss >= 2, "counters");
    // phase 2: stream of random lookups, skewed to a hot range
    stall = 1;
    for (int i = 0; i < 3000; i++) begin
      key_t k;
      k = ($urandom_range(0, 3) != 0) ? key_t'($urandom_range(0, 1023)) : key_t'($urandom_range(0, 4095));
      send(k);
    end
    stall = 0;
    repeat (300) @(negedge clk);
    for (int i = 0; i < 256; i++) chk(!pending[i], "every lookup answered");
    chk(n_res == 3004, "result count");
    $display("hits %0d misses %0d refills %0d shortened %0d leaf answers %0d memory reads %0d",
             n_hit, n_miss, n_fill, n_short, n_leaf_ans, n_reads);
    chk(n_hit > 0 && n_miss > 0 && n_fill > 0 && n_short > 0 && n_leaf_ans > 0, "every mechanism seen");
    chk(n_reads < 3 * 3004, "the cache saved memory reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog: %0d results, state %0d, id %0d pending %0d", n_res, dut.state, next_id, pending[next_id[7:0]]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
