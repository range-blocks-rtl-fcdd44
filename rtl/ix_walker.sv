// ix_walker: the index walker that serves index-cache misses.
//
// A walk descends an index from a start node (the root, or the node an index
// cache hit pointed to) to the leaf that holds the key and returns the
// pointer the leaf gives for the key. The walk is serial and data dependent,
// so one walk alone leaves memory idle; the walker therefore keeps NCTX walks
// in flight and switches among them at its two yield points:
//   WAIT    the current node is being read from memory
//   SEARCH  the node's keys are searched for the next child pointer
// Each context moves FREE -> ISSUE -> WAIT -> SEARCH -> (ISSUE ... | DONE).
// Per clock the walker can accept one walk, issue one memory read, take one
// memory response (tagged with the context), search one node on its single
// search unit (ix_child_select), and hand out one finished walk. Every
// node it reads, inner or leaf, is offered to the index cache on fill_*
// (dropped when the cache is not ready: caching is best effort).
// Interfaces: walk_* and res_* are valid/ready; mem_req_* is valid/ready;
// mem_resp_* is valid only (the walker always has room, one slot per
// context). Fixed priority (lowest context first) everywhere.
// The yield points and multiplexing of walks follow the document; the
// context count (4 outstanding walks, as one of its walkers has) and the
// priority scheme are this design's choices.
module ix_walker
  import rblox_pkg::*;
#(
  parameter int NCTX = 4,
  parameter int ID_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // new walk
  input  logic            walk_valid,
  output logic            walk_ready,
  input  key_t            walk_key,
  input  ptr_t            walk_ptr,
  input  logic [ID_W-1:0] walk_id,
  // memory
  output logic            mem_req_valid,
  input  logic            mem_req_ready,
  output ptr_t            mem_req_addr,
  output logic [$clog2(NCTX)-1:0] mem_req_tag,
  input  logic            mem_resp_valid,
  input  logic [$clog2(NCTX)-1:0] mem_resp_tag,
  input  ix_node_t        mem_resp_node,
  // index cache refill
  output logic            fill_valid,
  input  logic            fill_ready,
  output ix_node_t        fill_node,
  // finished walk
  output logic            res_valid,
  input  logic            res_ready,
  output logic [ID_W-1:0] res_id,
  output key_t            res_key,
  output ptr_t            res_ptr,
  output logic [7:0]      res_nodes   // nodes read by this walk
);
  localparam int CW = (NCTX > 1) ? $clog2(NCTX) : 1;

  typedef enum logic [2:0] {C_FREE, C_ISSUE, C_WAIT, C_SEARCH, C_DONE} cstate_e;

  cstate_e         cst   [NCTX];
  key_t            ckey  [NCTX];
  ptr_t            cptr  [NCTX];
  logic [ID_W-1:0] cid   [NCTX];
  logic [7:0]      cnodes[NCTX];
  ix_node_t        cnode [NCTX];

  logic          f_hit, i_hit, s_hit, d_hit;
  logic [CW-1:0] f_idx, i_idx, s_idx, d_idx;

  always_comb begin
    f_hit = 1'b0; i_hit = 1'b0; s_hit = 1'b0; d_hit = 1'b0;
    f_idx = '0;   i_idx = '0;   s_idx = '0;   d_idx = '0;
    for (int c = NCTX - 1; c >= 0; c--) begin
      if (cst[c] == C_FREE)   begin f_hit = 1'b1; f_idx = CW'(c); end
      if (cst[c] == C_ISSUE)  begin i_hit = 1'b1; i_idx = CW'(c); end
      if (cst[c] == C_SEARCH) begin s_hit = 1'b1; s_idx = CW'(c); end
      if (cst[c] == C_DONE)   begin d_hit = 1'b1; d_idx = CW'(c); end
    end
  end

  assign walk_ready    = f_hit;
  assign mem_req_valid = i_hit;
  assign mem_req_addr  = cptr[i_idx];
  assign mem_req_tag   = i_idx;

  // the single search unit
  logic [IX_NK_W-1:0] s_child;
  ptr_t               s_next;
  ix_child_select u_search (.key(ckey[s_idx]), .node(cnode[s_idx]), .child_idx(s_child), .child_ptr(s_next));

  assign fill_valid = s_hit;
  assign fill_node  = cnode[s_idx];

  assign res_valid = d_hit;
  assign res_id    = cid[d_idx];
  assign res_key   = ckey[d_idx];
  assign res_ptr   = cptr[d_idx];
  assign res_nodes = cnodes[d_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCTX; c++) begin
        cst[c]    <= C_FREE;
        ckey[c]   <= '0;
        cptr[c]   <= '0;
        cid[c]    <= '0;
        cnodes[c] <= '0;
        cnode[c]  <= '0;
      end
    end else begin
      if (walk_valid && f_hit) begin
        cst[f_idx]    <= C_ISSUE;
        ckey[f_idx]   <= walk_key;
        cptr[f_idx]   <= walk_ptr;
        cid[f_idx]    <= walk_id;
        cnodes[f_idx] <= '0;
      end
      if (i_hit && mem_req_ready) begin
        cst[i_idx]    <= C_WAIT;
        cnodes[i_idx] <= cnodes[i_idx] + 1'b1;
      end
      if (mem_resp_valid) begin
        cst[mem_resp_tag]   <= C_SEARCH;
        cnode[mem_resp_tag] <= mem_resp_node;
      end
      if (s_hit) begin
        cptr[s_idx] <= s_next;
        cst[s_idx]  <= cnode[s_idx].leaf ? C_DONE : C_ISSUE;
      end
      if (d_hit && res_ready) cst[d_idx] <= C_FREE;
    end
  end

  // a memory response must belong to a context that is waiting for it
  assert property (@(posedge clk) disable iff (!rst_n)
    mem_resp_valid |-> (cst[mem_resp_tag] == C_WAIT))
    else $error("ix_walker: memory response for a context that is not waiting");
  initial assert (NCTX >= 2) else $error("ix_walker: NCTX must be at least 2");
endmodule
