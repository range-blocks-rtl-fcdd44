// metal_ix: index walks short-circuited by the range-tagged index cache.
//
// A lookup for a key first probes the index cache (ix_cache). On a hit in a
// leaf node the cache's child pointer is already the answer and no memory is
// read. On a hit in an inner node the walk starts from the child pointer the
// cache returned instead of from the root; on a miss it starts from the root
// (root_ptr). Walks run in the walker (ix_walker), which reads index nodes
// from memory and offers every inner node it reads back to the cache.
//
// Interfaces: lk_* (valid/ready) takes lookups; res_* (valid/ready) returns
// the pointer the leaf gives for the key, whether the cache shortened the
// walk, and how many nodes were read from memory. mem_* is the walker's
// memory port (see ix_walker). The cache is shared by lookups and refills,
// one operation at a time; a refill offered while the cache is busy is
// dropped. Results of finished walks go out ahead of leaf hits.
// The hit/miss behaviour follows the document; the arbitration is this
// design's choice. Counters: hits, misses and refills stored.
module metal_ix
  import rblox_pkg::*;
#(
  parameter int NSETS      = 64,
  parameter int NWAYS      = 16,
  parameter int BLOCK_BITS = 8,
  parameter int LAT        = 5,
  parameter int NCTX       = 4,
  parameter int ID_W       = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  ptr_t            root_ptr,
  input  logic            lk_valid,
  output logic            lk_ready,
  input  key_t            lk_key,
  input  logic [ID_W-1:0] lk_id,
  output logic            res_valid,
  input  logic            res_ready,
  output logic [ID_W-1:0] res_id,
  output key_t            res_key,
  output ptr_t            res_ptr,
  output logic            res_short,
  output logic [7:0]      res_nodes,
  output logic            mem_req_valid,
  input  logic            mem_req_ready,
  output ptr_t            mem_req_addr,
  output logic [$clog2(NCTX)-1:0] mem_req_tag,
  input  logic            mem_resp_valid,
  input  logic [$clog2(NCTX)-1:0] mem_resp_tag,
  input  ix_node_t        mem_resp_node,
  output logic [31:0]     n_hit,
  output logic [31:0]     n_miss,
  output logic [31:0]     n_fill
);
  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_FILL, S_WALK, S_DIRECT} state_e;
  state_e state;

  key_t            key_q;
  logic [ID_W-1:0] id_q;
  ptr_t            start_q;

  // index cache
  logic     c_start, c_fill, c_busy, c_done, c_hit, c_leaf;
  key_t     c_lo, c_hi;
  logic [IX_LEVEL_W-1:0] c_level;
  ptr_t     c_self, c_child;
  ix_node_t w_fill_node;
  logic     w_fill_valid, w_fill_ready;

  assign w_fill_ready = (state == S_IDLE) && !c_busy;
  assign c_fill       = w_fill_valid;
  assign c_start      = (state == S_IDLE) && !c_busy && (w_fill_valid || lk_valid);
  assign lk_ready     = (state == S_IDLE) && !c_busy && !w_fill_valid;

  ix_cache #(.NSETS(NSETS), .NWAYS(NWAYS), .BLOCK_BITS(BLOCK_BITS), .LAT(LAT)) u_cache (
    .clk(clk), .rst_n(rst_n), .start(c_start), .fill(c_fill), .key(lk_key), .fill_node(w_fill_node),
    .busy(c_busy), .done(c_done), .hit(c_hit), .hit_lo(c_lo), .hit_hi(c_hi), .hit_level(c_level),
    .hit_leaf(c_leaf), .hit_self(c_self), .child_ptr(c_child)
  );

  // walker
  logic            w_res_valid, w_res_ready, w_walk_ready;
  logic [ID_W-1:0] w_res_id;
  key_t            w_res_key;
  ptr_t            w_res_ptr;
  logic [7:0]      w_res_nodes;

  ix_walker #(.NCTX(NCTX), .ID_W(ID_W)) u_walker (
    .clk(clk), .rst_n(rst_n),
    .walk_valid(state == S_WALK), .walk_ready(w_walk_ready), .walk_key(key_q), .walk_ptr(start_q),
    .walk_id(id_q),
    .mem_req_valid(mem_req_valid), .mem_req_ready(mem_req_ready), .mem_req_addr(mem_req_addr),
    .mem_req_tag(mem_req_tag), .mem_resp_valid(mem_resp_valid), .mem_resp_tag(mem_resp_tag),
    .mem_resp_node(mem_resp_node),
    .fill_valid(w_fill_valid), .fill_ready(w_fill_ready), .fill_node(w_fill_node),
    .res_valid(w_res_valid), .res_ready(w_res_ready), .res_id(w_res_id), .res_key(w_res_key),
    .res_ptr(w_res_ptr), .res_nodes(w_res_nodes)
  );

  // which walks the cache shortened, by lookup id
  logic [2**ID_W-1:0] short_by_id;

  // result merge: walker results first
  always_comb begin
    w_res_ready = res_ready;
    if (w_res_valid) begin
      res_valid = 1'b1;
      res_id    = w_res_id;
      res_key   = w_res_key;
      res_ptr   = w_res_ptr;
      res_short = short_by_id[w_res_id];
      res_nodes = w_res_nodes;
    end else begin
      res_valid = (state == S_DIRECT);
      res_id    = id_q;
      res_key   = key_q;
      res_ptr   = start_q;
      res_short = 1'b1;
      res_nodes = '0;
    end
  end


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      key_q       <= '0;
      id_q        <= '0;
      start_q     <= '0;
      short_by_id <= '0;
      n_hit       <= '0;
      n_miss      <= '0;
      n_fill      <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (c_start) begin
          if (c_fill) begin
            state <= S_FILL;
          end else begin
            key_q <= lk_key;
            id_q  <= lk_id;
            state <= S_LOOK;
          end
        end
        S_FILL: if (c_done) begin
          if (c_hit) n_fill <= n_fill + 1;
          state <= S_IDLE;
        end
        S_LOOK: if (c_done) begin
          if (c_hit) n_hit <= n_hit + 1;
          else       n_miss <= n_miss + 1;
          start_q <= c_hit ? c_child : root_ptr;
          short_by_id[id_q] <= c_hit;
          state   <= (c_hit && c_leaf) ? S_DIRECT : S_WALK;
        end
        S_WALK:   if (w_walk_ready) state <= S_IDLE;
        S_DIRECT: if (!w_res_valid && res_ready) state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end
endmodule
