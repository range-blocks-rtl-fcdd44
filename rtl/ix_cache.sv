// ix_cache: the METAL-IX index cache, a set-associative cache of index nodes
// tagged by key range instead of address.
//
// A block holds one index node: its tag is the node's [Lo, Hi] range and
// level; its data are the separator keys, the child pointers and the node's
// own address. The key space is cut into aligned key blocks of 2**BLOCK_BITS
// keys; the set of a key is the next log2(NSETS) bits above them. A node is
// cached in the set of every key block it covers (so it is found from any of
// its keys); a node covering more than REPL_MAX key blocks is not cached.
// Replacement is least-recently-used per set.
//
// Lookup (start with fill low) runs the hit path:
//   clock t+1  read the tag array of the key's set
//   clock t+2  match Lo <= key <= Hi in every way; among several matches the
//              deepest level wins (ties: lowest way); read that way's data
//   clock t+3  select the child pointer for the key (ix_child_select)
//   done at t+LAT (LAT >= 4; 5 by default) with hit, the node's range and
//   level, leaf flag, its own address and the child pointer.
// Fill (start with fill high) writes the node into each covered set, two
// clocks per set, and raises done afterwards; hit then says the node was
// stored. One operation at a time (busy).
// Range tags, set mapping by key block, level tie-break, parallel key
// compare and LRU follow the document. Defaults: 16 ways, 1024 entries
// (64 sets), 256-key blocks, 5-cycle access. Cacheing a node in every block
// it covers, and the REPL_MAX limit, are this design's reading.
module ix_cache
  import rblox_pkg::*;
#(
  parameter int NSETS      = 64,
  parameter int NWAYS      = 16,
  parameter int BLOCK_BITS = 8,
  parameter int REPL_MAX   = 4,
  parameter int LAT        = 5
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  logic     fill,
  input  key_t     key,
  input  ix_node_t fill_node,
  output logic     busy,
  output logic     done,
  output logic     hit,
  output key_t     hit_lo,
  output key_t     hit_hi,
  output logic [IX_LEVEL_W-1:0] hit_level,
  output logic     hit_leaf,
  output ptr_t     hit_self,
  output ptr_t     child_ptr
);
  localparam int SET_W = (NSETS > 1) ? $clog2(NSETS) : 1;
  localparam int WAY_W = (NWAYS > 1) ? $clog2(NWAYS) : 1;
  localparam int BLKN_W = KEY_W - BLOCK_BITS;

  typedef struct packed {
    key_t                  lo;
    key_t                  hi;
    logic [IX_LEVEL_W-1:0] level;
    logic                  leaf;
  } tag_t;

  typedef struct packed {
    logic [IX_NK_W-1:0]  nkeys;
    key_t [IX_NKEYS-1:0] keys;
    ptr_t [IX_NKEYS:0]   ptrs;
    ptr_t                self;
  } data_t;

  typedef enum logic [2:0] {S_IDLE, S_TAG, S_MATCH, S_DATA, S_WAIT, S_FTAG, S_FWR, S_FDONE} state_e;

  state_e            state;
  key_t              key_q;
  ix_node_t          node_q;
  logic [BLKN_W-1:0] blk, blk_last;
  logic [$clog2(LAT+1)-1:0] cnt;

  logic [NWAYS-1:0]  valid [NSETS];
  logic [WAY_W-1:0]  age   [NSETS][NWAYS];
  tag_t              tag_rd  [NWAYS];
  data_t             data_rd [NWAYS];

  logic [SET_W-1:0]  cur_set, set_q;
  logic              tag_rd_en, data_rd_en, wr_en;
  logic [WAY_W-1:0]  sel_way, victim, way_q;

  assign cur_set = (state == S_IDLE) ? SET_W'(key[BLOCK_BITS +: SET_W]) : SET_W'(blk);
  assign tag_rd_en  = (state == S_TAG) || (state == S_FTAG);
  assign data_rd_en = (state == S_MATCH);
  assign wr_en      = (state == S_FWR);

  for (genvar w = 0; w < NWAYS; w++) begin : g_way
    tag_t  tmem [NSETS];
    data_t dmem [NSETS];
    always_ff @(posedge clk) begin
      if (tag_rd_en) tag_rd[w] <= tmem[set_q];
      if (data_rd_en && sel_way == WAY_W'(w)) data_rd[w] <= dmem[set_q];
      if (wr_en && victim == WAY_W'(w)) begin
        tmem[set_q] <= '{lo: node_q.lo, hi: node_q.hi, level: node_q.level, leaf: node_q.leaf};
        dmem[set_q] <= '{nkeys: node_q.nkeys, keys: node_q.keys, ptrs: node_q.ptrs, self: node_q.self};
      end
    end
  end

  // match stage: Lo <= key <= Hi, deepest level wins
  logic             m_hit;
  logic [NWAYS-1:0] match, same;
  always_comb begin
    m_hit   = 1'b0;
    sel_way = '0;
    for (int w = 0; w < NWAYS; w++) begin
      match[w] = valid[set_q][w] && (tag_rd[w].lo <= key_q) && (key_q <= tag_rd[w].hi);
      same[w]  = valid[set_q][w] && (tag_rd[w].lo == node_q.lo) && (tag_rd[w].hi == node_q.hi)
                 && (tag_rd[w].level == node_q.level);
      if (match[w] && (!m_hit || tag_rd[w].level > tag_rd[sel_way].level)) begin
        m_hit   = 1'b1;
        sel_way = WAY_W'(w);
      end
    end
  end

  // fill victim: the same node already cached, else an invalid way, else LRU
  always_comb begin
    victim = '0;
    for (int w = NWAYS - 1; w >= 0; w--) if (age[set_q][w] == WAY_W'(NWAYS - 1)) victim = WAY_W'(w);
    for (int w = NWAYS - 1; w >= 0; w--) if (!valid[set_q][w]) victim = WAY_W'(w);
    for (int w = NWAYS - 1; w >= 0; w--) if (same[w]) victim = WAY_W'(w);
  end

  // child selection on the data of the matched way
  ix_node_t sel_node;
  logic [IX_NK_W-1:0] cidx;
  ptr_t               cptr;
  always_comb begin
    sel_node       = '0;
    sel_node.nkeys = data_rd[way_q].nkeys;
    sel_node.keys  = data_rd[way_q].keys;
    sel_node.ptrs  = data_rd[way_q].ptrs;
  end
  ix_child_select u_sel (.key(key_q), .node(sel_node), .child_idx(cidx), .child_ptr(cptr));

  assign busy = (state != S_IDLE);

  // LRU: touch way tw of set ts
  task automatic touch(input logic [SET_W-1:0] ts, input logic [WAY_W-1:0] tw);
    for (int v = 0; v < NWAYS; v++)
      if (age[ts][v] < age[ts][tw]) age[ts][v] <= age[ts][v] + 1'b1;
    age[ts][tw] <= '0;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      key_q     <= '0;
      node_q    <= '0;
      blk       <= '0;
      blk_last  <= '0;
      set_q     <= '0;
      way_q     <= '0;
      cnt       <= '0;
      done      <= 1'b0;
      hit       <= 1'b0;
      hit_lo    <= '0;
      hit_hi    <= '0;
      hit_level <= '0;
      hit_leaf  <= 1'b0;
      hit_self  <= '0;
      child_ptr <= '0;
      for (int s = 0; s < NSETS; s++) begin
        valid[s] <= '0;
        for (int w = 0; w < NWAYS; w++) age[s][w] <= WAY_W'(w);
      end
    end else begin
      done <= 1'b0;
      cnt  <= cnt + 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          key_q  <= key;
          node_q <= fill_node;
          cnt    <= 1;
          hit    <= 1'b0;
          if (fill) begin
            blk      <= fill_node.lo[KEY_W-1:BLOCK_BITS];
            blk_last <= fill_node.hi[KEY_W-1:BLOCK_BITS];
            set_q    <= SET_W'(fill_node.lo[BLOCK_BITS +: SET_W]);
            state    <= (fill_node.hi >= fill_node.lo &&
                         (fill_node.hi[KEY_W-1:BLOCK_BITS] - fill_node.lo[KEY_W-1:BLOCK_BITS]) < BLKN_W'(REPL_MAX))
                        ? S_FTAG : S_FDONE;
          end else begin
            set_q <= cur_set;
            state <= S_TAG;
          end
        end
        S_TAG:   state <= S_MATCH;
        S_MATCH: begin
          hit   <= m_hit;
          way_q <= sel_way;
          if (m_hit) begin
            hit_lo    <= tag_rd[sel_way].lo;
            hit_hi    <= tag_rd[sel_way].hi;
            hit_level <= tag_rd[sel_way].level;
            hit_leaf  <= tag_rd[sel_way].leaf;
            touch(set_q, sel_way);
          end
          state <= S_DATA;
        end
        S_DATA: begin
          if (hit) begin
            child_ptr <= cptr;
            hit_self  <= data_rd[way_q].self;
          end
          state <= S_WAIT;
        end
        S_WAIT: if (cnt >= ($bits(cnt))'(LAT - 1)) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        S_FTAG: state <= S_FWR;
        S_FWR: begin
          valid[set_q][victim] <= 1'b1;
          touch(set_q, victim);
          if (blk == blk_last) begin
            hit   <= 1'b1;
            state <= S_FDONE;
          end else begin
            blk   <= blk + 1'b1;
            set_q <= SET_W'(blk + 1'b1);
            state <= S_FTAG;
          end
        end
        S_FDONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (LAT >= 4) else $error("ix_cache: LAT must be at least 4");
endmodule
