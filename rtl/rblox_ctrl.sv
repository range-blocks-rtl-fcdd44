// rblox_ctrl: the range-lock unit's controller. It executes the lock API on
// the LTable (locked ranges, correctness) and the UTable (unlocked ranges,
// speed), one request at a time, so each operation is atomic.
//
//   r_lock fresh   LTable check; join an identical shared entry, else take a
//                  free entry. Denied (ok = 0) on conflict; the tile backs off
//                  and retries.
//   r_lock trim    contract the tile's entry lt_idx (hand-over-hand by
//                  trimming). The new range must lie inside the old one: a
//                  lock may never expand. Sole holder: the entry is updated in
//                  place. Shared with others: the tile leaves it and takes a
//                  new entry.
//   r_unlock       the tile leaves entry lt_idx; when the entry frees and a
//                  node pointer is given, the range goes into the UTable.
//   r_trylock key  UTable lookup of the narrowest safe range holding the key;
//                  on a hit the range is checked in the LTable, locked
//                  exclusive, and removed from the UTable. Returns the node
//                  pointer, or 0 when the tile must take the ordered path.
//   check          reader validation: does [lo,hi] overlap another tile's
//                  (exclusive) lock.
//   fill           a reader registers an unlocked safe range in the UTable
//                  when no lock overlaps it.
// Every granted exclusive lock drops overlapping UTable entries, keeping
// locked and unlocked ranges apart.
//
// Timing: request handshake req_valid/req_ready, response resp_valid /
// resp_ready (held until taken). An LTable access costs LT_LAT clocks and a
// UTable access UT_LAT clocks (5 each by default, the document's per-bank
// access time). A request taken at clock t answers at t+LT_LAT+1 when it
// touches the LTable only; each UTable step adds UT_LAT+1.
// The API and the table roles follow the document; sequential one-at-a-time
// execution and the compatibility of shared and exclusive entries (see
// ltable) are this design's.
module rblox_ctrl
  import rblox_pkg::*;
#(
  parameter int N_TILES   = 128,
  parameter int LT_LAT    = 5,
  parameter int UT_LAT    = 5,
  parameter int UT_BANKS  = 4,
  parameter int UT_SETS   = 128,
  parameter int UT_WAYS   = 8,
  parameter int SEG_BITS  = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,
  output logic     req_ready,
  input  rb_req_t  req,
  output logic     resp_valid,
  input  logic     resp_ready,
  output rb_resp_t resp,
  output logic [$clog2(N_TILES+1)-1:0] lt_occupancy
);
  typedef enum logic [2:0] {S_IDLE, S_LT, S_LT2, S_UTS, S_UTW, S_RESP} state_e;

  state_e   state;
  rb_req_t  rq;
  key_t     p_lo, p_hi;
  ut_cmd_e  ut_cmd_q;
  ptr_t     ut_ptr_q;
  logic     ut_safe_q;
  rb_resp_t rs;
  logic [$clog2(LT_LAT+1)-1:0] cnt;

  // ---------------------------------------------------------------- LTable
  logic    conflict, any_ov, ex_ov, join_hit, free_hit;
  ltidx_t  join_idx, free_idx;
  logic    rd_valid, rd_held, rd_sole;
  key_t    rd_lo, rd_hi;
  lock_e   rd_type;
  lt_cmd_e lt_cmd;
  ltidx_t  lt_idx;
  lock_e   lt_type, p_type;
  logic    p_excl;

  assign p_type = (rq.op == OP_TRYLOCK) ? LK_EX : rq.ltype;
  assign p_excl = (rq.op == OP_LOCK && rq.trim);

  ltable #(.N_ENTRIES(N_TILES), .N_TILES(N_TILES)) u_lt (
    .clk(clk), .rst_n(rst_n),
    .p_lo(p_lo), .p_hi(p_hi), .p_tile(rq.tile), .p_type(p_type),
    .p_excl_en(p_excl), .p_excl_idx(rq.lt_idx),
    .conflict(conflict), .any_overlap(any_ov), .ex_overlap(ex_ov),
    .join_hit(join_hit), .join_idx(join_idx), .free_hit(free_hit), .free_idx(free_idx),
    .rd_idx(rq.lt_idx), .rd_valid(rd_valid), .rd_lo(rd_lo), .rd_hi(rd_hi), .rd_type(rd_type),
    .rd_held(rd_held), .rd_sole(rd_sole),
    .cmd(lt_cmd), .cmd_idx(lt_idx), .cmd_lo(p_lo), .cmd_hi(p_hi), .cmd_type(lt_type),
    .cmd_tile(rq.tile), .occupancy(lt_occupancy)
  );

  // ---------------------------------------------------------------- UTable
  logic ut_busy, ut_done, ut_hit;
  key_t ut_lo, ut_hi;
  ptr_t ut_ptr;

  utable #(.NBANKS(UT_BANKS), .NSETS(UT_SETS), .NWAYS(UT_WAYS), .SEG_BITS(SEG_BITS), .LAT(UT_LAT)) u_ut (
    .clk(clk), .rst_n(rst_n), .start(state == S_UTS), .cmd(ut_cmd_q),
    .lo(p_lo), .hi(p_hi), .ptr(ut_ptr_q), .safe(ut_safe_q),
    .busy(ut_busy), .done(ut_done), .hit(ut_hit), .hit_lo(ut_lo), .hit_hi(ut_hi), .hit_ptr(ut_ptr)
  );

  // ------------------------------------------------------ decision (S_LT)
  logic decide;
  assign decide = (state == S_LT) && (cnt == ($bits(cnt))'(LT_LAT));

  // outcome of the LTable step, combinational in the deciding clock
  typedef enum logic [1:0] {N_RESP, N_LT2, N_UT} next_e;
  logic     g_ok;
  next_e    g_next;
  ut_cmd_e  g_ut;

  always_comb begin
    lt_cmd  = LT_NOP;
    lt_idx  = rq.lt_idx;
    lt_type = p_type;
    g_ok    = 1'b0;
    g_next  = N_RESP;
    g_ut    = UT_INVAL;
    if (decide) begin
      unique case (rq.op)
        OP_LOCK: begin
          if (p_hi < p_lo) begin
            g_ok = 1'b0;
          end else if (!rq.trim) begin
            if (conflict) begin
              g_ok = 1'b0;
            end else if (p_type == LK_SH && join_hit) begin
              lt_cmd = LT_JOIN; lt_idx = join_idx; g_ok = 1'b1;
            end else if (free_hit) begin
              lt_cmd = LT_ALLOC; lt_idx = free_idx; g_ok = 1'b1;
            end
          end else begin
            // contraction only, by a holder of the entry
            if (!rd_held || p_lo < rd_lo || p_hi > rd_hi || conflict) begin
              g_ok = 1'b0;
            end else if (rd_sole) begin
              lt_cmd = LT_UPDATE; g_ok = 1'b1;
            end else begin
              lt_cmd = LT_LEAVE; g_ok = 1'b1; g_next = N_LT2;
            end
          end
          if (g_ok && p_type == LK_EX && g_next == N_RESP) g_next = N_UT;
        end
        OP_UNLOCK: begin
          if (rd_held) begin
            lt_cmd = LT_LEAVE; g_ok = 1'b1;
            if (rd_sole && rq.node_ptr != '0) begin
              g_next = N_UT; g_ut = UT_INSERT;
            end
          end
        end
        OP_TRYLOCK: begin
          if (!conflict && free_hit) begin
            lt_cmd = LT_ALLOC; lt_idx = free_idx; g_ok = 1'b1; g_next = N_UT;
          end
        end
        OP_FILL: begin
          if (!any_ov && p_hi >= p_lo && rq.node_ptr != '0) begin
            g_next = N_UT; g_ut = UT_INSERT;
          end
        end
        default: g_ok = !ex_ov;  // OP_CHECK
      endcase
    end else if (state == S_LT2) begin
      // second half of a trim out of a shared entry
      if (p_type == LK_SH && join_hit) begin
        lt_cmd = LT_JOIN; lt_idx = join_idx;
      end else begin
        lt_cmd = LT_ALLOC; lt_idx = free_idx;
      end
    end
  end

  // ------------------------------------------------------------ sequencing
  assign req_ready  = (state == S_IDLE);
  assign resp_valid = (state == S_RESP);
  assign resp       = rs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      rq             <= '0;
      p_lo           <= '0;
      p_hi           <= '0;
      cnt            <= '0;
      ut_cmd_q       <= UT_LOOKUP;
      ut_ptr_q       <= '0;
      ut_safe_q      <= 1'b0;
      rs             <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req_valid) begin
          rq             <= req;
          p_lo           <= req.lo;
          p_hi           <= (req.op == OP_TRYLOCK) ? req.lo : req.hi;
          ut_ptr_q       <= req.node_ptr;
          ut_safe_q      <= req.safe;
          rs             <= '0;
          rs.op          <= req.op;
          rs.tile        <= req.tile;
          rs.lt_idx      <= req.lt_idx;
          cnt            <= 1;
          if (req.op == OP_TRYLOCK) begin
            ut_cmd_q <= UT_LOOKUP;
            state    <= S_UTS;
          end else begin
            state    <= S_LT;
          end
        end
        S_LT: begin
          cnt <= cnt + 1'b1;
          if (decide) begin
            rs.ok <= g_ok;
            if (rq.op == OP_CHECK) begin
              rs.locked_any <= any_ov;
              rs.locked_ex  <= ex_ov;
            end
            if (lt_cmd == LT_ALLOC || lt_cmd == LT_JOIN) rs.lt_idx <= lt_idx;
            if (rq.op == OP_TRYLOCK) begin
              rs.lo <= p_lo;
              rs.hi <= p_hi;
              if (g_ok) rs.node_ptr <= ut_ptr_q;
            end
            if (rq.op == OP_UNLOCK && g_next == N_UT) begin
              p_lo <= rd_lo;
              p_hi <= rd_hi;
            end
            ut_cmd_q <= g_ut;
            unique case (g_next)
              N_LT2:   state <= S_LT2;
              N_UT:    state <= S_UTS;
              default: state <= S_RESP;
            endcase
          end
        end
        S_LT2: begin
          rs.lt_idx <= lt_idx;
          if (!(p_type == LK_SH && join_hit) && !free_hit) rs.ok <= 1'b0;
          ut_cmd_q <= UT_INVAL;
          state    <= (p_type == LK_EX) ? S_UTS : S_RESP;
        end
        S_UTS: state <= S_UTW;
        S_UTW: if (ut_done) begin
          if (ut_cmd_q == UT_LOOKUP) begin
            if (ut_hit) begin
              p_lo     <= ut_lo;
              p_hi     <= ut_hi;
              ut_ptr_q <= ut_ptr;
              cnt      <= 1;
              state    <= S_LT;
            end else begin
              rs.ok <= 1'b0;
              state <= S_RESP;
            end
          end else begin
            if (rq.op == OP_FILL) rs.ok <= ut_hit;
            state <= S_RESP;
          end
        end
        S_RESP: if (resp_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // a response, once offered, stays until taken
  assert property (@(posedge clk) disable iff (!rst_n)
    (resp_valid && !resp_ready) |=> (resp_valid && $stable(resp)))
    else $error("rblox_ctrl: response changed before it was taken");
  // the UTable is started only when idle
  assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_UTS) |-> !ut_busy)
    else $error("rblox_ctrl: UTable started while busy");
endmodule
