// tb_rblox_system: end-to-end test of the full-size system (no parameter
// overrides: 128 tiles, 128-entry LTable, 4x128x8 UTable, 1024-entry index
// cache).
//
// Range locks. Phase 1, one tile alone, checks the latencies from raising a
// request to its response: 1 (arbiter) + LINK + controller + LINK, where
// the controller takes LT_LAT+1 for LTable-only work, LT_LAT+UT_LAT+2 when
// the UTable is written, UT_LAT+2 for a trylock miss and 2*UT_LAT+LT_LAT+3
// for a trylock hit. Phase 2 runs all 128 tiles at once on a B+tree-like key
// space [0,4095] (root, 512-key inner nodes, 64-key leaves):
//   writers   trylock the key's leaf (instant locking); on a miss they take
//             the root shared (joining one shared entry), trim to the leaf
//             exclusive, sometimes try to expand (must be refused), mutate
//             for a while and unlock, usually registering the leaf in the
//             UTable.
//   splitters take an inner node exclusive with a fresh lock.
//   readers   check a key, and sometimes fill its leaf into the UTable.
// A scoreboard of what every tile holds checks each grant: no two tiles
// hold overlapping exclusive ranges, and a shared range overlapping an
// exclusive one of another tile must cover it. Trylock hits must return the
// pointer registered for that range. Every mechanism is counted and the
// test fails if one never happened.
// Index cache: a lookup stream with a random-delay memory runs alongside;
// every result pointer is checked and hits, misses, refills and leaf
// answers are counted. A watchdog counts a failure.
`timescale 1ns/1ps
module tb_rblox_system;
  import rblox_pkg::*;
  import ix_tree_pkg::*;
  localparam int N      = 128;
  localparam int LINK   = 2;
  localparam int LT_LAT = 5;
  localparam int UT_LAT = 5;
  localparam int OPS    = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] tile_req_valid, tile_req_ready, tile_resp_valid;
  rb_req_t      tile_req [N];
  rb_resp_t     tile_resp;
  logic [7:0]   lt_occupancy;

  logic lk_valid, lk_ready; key_t lk_key; logic [7:0] lk_id;
  logic res_valid, res_ready; logic [7:0] res_id; key_t res_key; ptr_t res_ptr;
  logic res_short; logic [7:0] res_nodes;
  logic mem_req_valid, mem_req_ready; ptr_t mem_req_addr; logic [1:0] mem_req_tag;
  logic mem_resp_valid; logic [1:0] mem_resp_tag; ix_node_t mem_resp_node;
  logic [31:0] ix_n_hit, ix_n_miss, ix_n_fill;

  rblox_system dut (
    .clk(clk), .rst_n(rst_n),
    .tile_req_valid(tile_req_valid), .tile_req_ready(tile_req_ready), .tile_req(tile_req),
    .tile_resp_valid(tile_resp_valid), .tile_resp(tile_resp), .lt_occupancy(lt_occupancy),
    .ix_root_ptr(ROOT), .ix_lk_valid(lk_valid), .ix_lk_ready(lk_ready), .ix_lk_key(lk_key),
    .ix_lk_id(lk_id), .ix_res_valid(res_valid), .ix_res_ready(res_ready), .ix_res_id(res_id),
    .ix_res_key(res_key), .ix_res_ptr(res_ptr), .ix_res_short(res_short),
    .ix_res_nodes(res_nodes), .ix_mem_req_valid(mem_req_valid),
    .ix_mem_req_ready(mem_req_ready), .ix_mem_req_addr(mem_req_addr),
    .ix_mem_req_tag(mem_req_tag), .ix_mem_resp_valid(mem_resp_valid),
    .ix_mem_resp_tag(mem_resp_tag), .ix_mem_resp_node(mem_resp_node),
    .ix_n_hit(ix_n_hit), .ix_n_miss(ix_n_miss), .ix_n_fill(ix_n_fill)
  );

  int checks = 0, failures = 0;
  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  longint now = 0;
  always @(posedge clk) now <= now + 1;

  // arbitration: clocks where several tiles asked at once
  int n_contend = 0;
  always @(posedge clk) if (rst_n && $countones(tile_req_valid) > 1) n_contend++;

  // ---------------------------------------------------------------- helpers
  function automatic ptr_t enc(input key_t lo, input key_t hi);
    return {8'h80, lo[11:0], hi[11:0]};
  endfunction
  function automatic key_t leaf_lo(input key_t k);  return k & ~key_t'(63);  endfunction
  function automatic key_t inner_lo(input key_t k); return k & ~key_t'(511); endfunction

  // scoreboard: what each tile holds (one range per tile at a time)
  logic   h_v [N];
  key_t   h_lo [N], h_hi [N];
  lock_e  h_t [N];
  ltidx_t h_idx [N];

  // checks a grant of [lo,hi] of type ty to tile t against all other holders
  task automatic grant_ok(input int t, input key_t lo, input key_t hi, input lock_e ty);
    for (int o = 0; o < N; o++) if (o != t && h_v[o] && h_lo[o] <= hi && lo <= h_hi[o]) begin
      if (ty == LK_EX && h_t[o] == LK_EX)
        chk(0, $sformatf("tile %0d got [%0d,%0d] EX over tile %0d's EX [%0d,%0d]", t, lo, hi, o, h_lo[o], h_hi[o]));
      else if (ty == LK_EX && !(h_lo[o] <= lo && hi <= h_hi[o]))
        chk(0, $sformatf("tile %0d got [%0d,%0d] EX inside tile %0d's SH [%0d,%0d]", t, lo, hi, o, h_lo[o], h_hi[o]));
      else if (ty == LK_SH && h_t[o] == LK_EX && !(lo <= h_lo[o] && h_hi[o] <= hi))
        chk(0, $sformatf("tile %0d got [%0d,%0d] SH over tile %0d's EX [%0d,%0d]", t, lo, hi, o, h_lo[o], h_hi[o]));
    end
    checks++;
  endtask

  task automatic hold(input int t, input key_t lo, input key_t hi, input lock_e ty, input ltidx_t idx);
    h_v[t] = 1; h_lo[t] = lo; h_hi[t] = hi; h_t[t] = ty; h_idx[t] = idx;
  endtask

  // one request/response transaction of tile t; lat counts clocks from
  // raising the request to the clock the response is taken
  task automatic xact(input int t, input rb_req_t rq, output rb_resp_t rs, output int lat);
    longint t0;
    @(negedge clk);
    tile_req[t] = rq;
    tile_req_valid[t] = 1'b1;
    t0 = now;
    do @(posedge clk); while (!tile_req_ready[t]);
    @(negedge clk);
    tile_req_valid[t] = 1'b0;
    do @(posedge clk); while (!tile_resp_valid[t]);
    rs = tile_resp;
    lat = int'(now - t0) + 1;
    checks++;
    if (rs.op != rq.op || int'(rs.tile) != t) begin
      failures++; $display("FAIL response routed to tile %0d op %0d", t, rs.op);
    end
  endtask

  function automatic rb_req_t mk(input op_e op, input key_t lo, input key_t hi, input lock_e ty,
                                 input logic trim, input ltidx_t idx, input ptr_t ptr, input logic safe);
    rb_req_t r;
    r = '0;
    r.op = op; r.lo = lo; r.hi = hi; r.ltype = ty; r.trim = trim; r.lt_idx = idx;
    r.node_ptr = ptr; r.safe = safe;
    return r;
  endfunction

  // mechanism counters
  int n_join = 0, n_fresh_sh = 0, n_fresh_ex = 0, n_deny_fresh = 0, n_deny_trim = 0;
  int n_trim_inplace = 0, n_trim_split = 0, n_expand_refused = 0;
  int n_check_locked = 0, n_check_free = 0, n_fill_ok = 0, n_fill_refused = 0;
  int n_unlock_reg = 0, n_unlock_plain = 0, n_try_hit = 0, n_try_miss = 0;
  int n_gave_up = 0, tiles_done = 0, max_occ = 0;
  always @(posedge clk) if (int'(lt_occupancy) > max_occ) max_occ = int'(lt_occupancy);

  // unlock and forget
  task automatic release_lock(input int t, input logic reg_it);
    rb_resp_t rs; int lat;
    ptr_t p;
    p = reg_it ? enc(h_lo[t], h_hi[t]) : '0;
    h_v[t] = 0;
    xact(t, mk(OP_UNLOCK, h_lo[t], h_hi[t], h_t[t], 0, h_idx[t], p, 1'b1), rs, lat);
    chk(rs.ok, "unlock accepted");
    if (reg_it) n_unlock_reg++; else n_unlock_plain++;
  endtask

  // ------------------------------------------------------------ tile program
  task automatic writer(input int t, input key_t k);
    rb_resp_t rs; int lat, tries;
    key_t llo;
    logic got;
    llo = leaf_lo(k);
    got = 0;
    if ($urandom_range(0, 1) == 1) begin
      xact(t, mk(OP_TRYLOCK, k, k, LK_EX, 0, 0, 0, 0), rs, lat);
      if (rs.ok) begin
        n_try_hit++;
        chk(rs.lo <= k && k <= rs.hi, "trylock range holds the key");
        chk(rs.node_ptr == enc(rs.lo, rs.hi), "trylock returns the registered node");
        grant_ok(t, rs.lo, rs.hi, LK_EX);
        hold(t, rs.lo, rs.hi, LK_EX, rs.lt_idx);
        got = 1;
      end else begin
        n_try_miss++;
        chk(rs.node_ptr == '0, "trylock miss returns no node");
      end
    end
    if (!got) begin
      // ordered path: enter at the root, shared
      tries = 0;
      do begin
        xact(t, mk(OP_LOCK, 0, 4095, LK_SH, 0, 0, 0, 0), rs, lat);
        if (!rs.ok) begin n_deny_fresh++; repeat ($urandom_range(1, 8)) @(negedge clk); end
      end while (!rs.ok);
      begin
        logic joined; ltidx_t jidx;
        joined = 0; jidx = 0;
        for (int o = 0; o < N; o++)
          if (o != t && h_v[o] && h_t[o] == LK_SH && h_lo[o] == 0 && h_hi[o] == 4095) begin
            joined = 1; jidx = h_idx[o];
          end
        if (joined) begin
          n_join++;
          chk(rs.lt_idx == jidx, "identical shared lock joins the existing entry");
        end else n_fresh_sh++;
      end
      grant_ok(t, 0, 4095, LK_SH);
      hold(t, 0, 4095, LK_SH, rs.lt_idx);
      // trim to the leaf, exclusive
      do begin
        ltidx_t idx0;
        idx0 = h_idx[t];
        xact(t, mk(OP_LOCK, llo, llo + 63, LK_EX, 1, h_idx[t], 0, 0), rs, lat);
        if (rs.ok) begin
          if (rs.lt_idx == idx0) n_trim_inplace++; else n_trim_split++;
          grant_ok(t, llo, llo + 63, LK_EX);
          hold(t, llo, llo + 63, LK_EX, rs.lt_idx);
        end else begin
          n_deny_trim++;
          repeat ($urandom_range(1, 8)) @(negedge clk);
        end
      end while (!rs.ok);
    end
    // a lock may never expand
    if ($urandom_range(0, 9) == 0) begin
      key_t lo0, hi0;
      lo0 = h_lo[t]; hi0 = h_hi[t];
      xact(t, mk(OP_LOCK, lo0, hi0 + 64, LK_EX, 1, h_idx[t], 0, 0), rs, lat);
      chk(!rs.ok, "expansion refused");
      n_expand_refused++;
    end
    // mutate
    repeat ($urandom_range(3, 20)) @(negedge clk);
    grant_ok(t, h_lo[t], h_hi[t], LK_EX);
    release_lock(t, $urandom_range(0, 3) != 0);
  endtask

  task automatic splitter(input int t, input key_t k);
    rb_resp_t rs; int lat, tries;
    key_t ilo;
    ilo = inner_lo(k);
    tries = 0;
    do begin
      xact(t, mk(OP_LOCK, ilo, ilo + 511, LK_EX, 0, 0, 0, 0), rs, lat);
      if (!rs.ok) begin n_deny_fresh++; tries++; repeat ($urandom_range(1, 8)) @(negedge clk); end
    end while (!rs.ok && tries < 100);
    if (!rs.ok) begin n_gave_up++; return; end
    n_fresh_ex++;
    grant_ok(t, ilo, ilo + 511, LK_EX);
    hold(t, ilo, ilo + 511, LK_EX, rs.lt_idx);
    repeat ($urandom_range(3, 20)) @(negedge clk);
    release_lock(t, $urandom_range(0, 1) != 0);
  endtask

  task automatic reader(input int t, input key_t k);
    rb_resp_t rs; int lat;
    logic sb_ex;
    sb_ex = 0;
    for (int o = 0; o < N; o++) if (o != t && h_v[o] && h_t[o] == LK_EX && h_lo[o] <= k && k <= h_hi[o]) sb_ex = 1;
    xact(t, mk(OP_CHECK, k, k, LK_SH, 0, 0, 0, 0), rs, lat);
    if (sb_ex) chk(rs.locked_ex && !rs.ok, "check sees a held exclusive lock");
    if (rs.locked_ex) n_check_locked++; else n_check_free++;
    chk(rs.ok == !rs.locked_ex && (rs.locked_any || !rs.locked_ex), "check answer consistent");
    if ($urandom_range(0, 3) == 0) begin
      key_t llo;
      llo = leaf_lo(k);
      xact(t, mk(OP_FILL, llo, llo + 63, LK_SH, 0, 0, enc(llo, llo + 63), 1'b1), rs, lat);
      if (rs.ok) n_fill_ok++; else n_fill_refused++;
    end
  endtask

  logic go = 0;
  for (genvar g = 0; g < N; g++) begin : g_tile
    initial begin
      tile_req_valid[g] = 1'b0;
      tile_req[g] = '0;
      h_v[g] = 0; h_lo[g] = 0; h_hi[g] = 0; h_t[g] = LK_EX; h_idx[g] = 0;
      wait (go);
      repeat ($urandom_range(0, 20)) @(negedge clk);
      for (int op = 0; op < OPS; op++) begin
        key_t k;
        int r;
        k = ($urandom_range(0, 3) != 0) ? key_t'($urandom_range(0, 1023)) : key_t'($urandom_range(0, 4095));
        r = $urandom_range(0, 99);
        if (r < 20) reader(g, k);
        else if (r < 26) splitter(g, k);
        else writer(g, k);
        repeat ($urandom_range(0, 10)) @(negedge clk);
      end
      tiles_done++;
    end
  end

  // ------------------------------------------------------------ index cache
  longint due [4];
  ptr_t   maddr [4];
  int     n_reads = 0;
  initial for (int t = 0; t < 4; t++) due[t] = 0;
  always @(negedge clk) begin
    mem_resp_valid = 0;
    for (int t = 0; t < 4; t++) if (due[t] > 0 && now >= due[t] && !mem_resp_valid) begin
      mem_resp_valid = 1; mem_resp_tag = 2'(t); mem_resp_node = node_at(maddr[t]); due[t] = 0;
    end
    mem_req_ready = ($urandom_range(0, 5) != 0);
    res_ready     = ($urandom_range(0, 6) != 0);
  end
  always @(posedge clk) if (rst_n && mem_req_valid && mem_req_ready) begin
    due[mem_req_tag]   <= now + $urandom_range(3, 20);
    maddr[mem_req_tag] <= mem_req_addr;
    n_reads <= n_reads + 1;
  end

  key_t exp_key [256];
  logic pend [256];
  int   ix_sent = 0, ix_res = 0, ix_leaf_ans = 0, ix_short = 0;
  always @(posedge clk) if (rst_n && res_valid && res_ready) begin
    chk(pend[res_id] && res_key == exp_key[res_id], "index result for an outstanding lookup");
    chk(res_ptr == expected(res_key), $sformatf("index result pointer for key %0d", res_key));
    pend[res_id] = 0;
    ix_res++;
    if (res_short) ix_short++;
    if (res_short && res_nodes == 0) ix_leaf_ans++;
  end

  initial begin
    for (int i = 0; i < 256; i++) pend[i] = 0;
    lk_valid = 0; lk_key = 0; lk_id = 0;
    wait (go);
    for (int i = 0; i < 2000; i++) begin
      key_t k;
      k = ($urandom_range(0, 3) != 0) ? key_t'($urandom_range(0, 1023)) : key_t'($urandom_range(0, 4095));
      @(negedge clk);
      while (pend[i % 256]) @(negedge clk);
      lk_valid = 1; lk_key = k; lk_id = 8'(i);
      #1;
      while (!lk_ready) begin @(negedge clk); #1; end
      exp_key[i % 256] = k; pend[i % 256] = 1; ix_sent++;
      @(negedge clk);
      lk_valid = 0;
    end
  end

  // ------------------------------------------------------------ main
  int L0;
  initial begin
    rb_resp_t rs; int lat;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    // phase 1: tile 5 alone
    L0 = 1 + LINK + LINK;
    xact(5, mk(OP_CHECK, 0, 63, LK_SH, 0, 0, 0, 0), rs, lat);
    chk(rs.ok && !rs.locked_any, "check on an empty table");
    chk(lat == L0 + LT_LAT + 1, $sformatf("check latency %0d", lat));
    xact(5, mk(OP_FILL, 0, 63, LK_SH, 0, 0, enc(0, 63), 1'b1), rs, lat);
    chk(rs.ok, "fill stored");
    chk(lat == L0 + LT_LAT + UT_LAT + 2, $sformatf("fill latency %0d", lat));
    n_fill_ok++;
    xact(5, mk(OP_TRYLOCK, 5, 5, LK_EX, 0, 0, 0, 0), rs, lat);
    chk(rs.ok && rs.lo == 0 && rs.hi == 63 && rs.node_ptr == enc(0, 63), "trylock hit on the filled leaf");
    chk(lat == L0 + 2 * UT_LAT + LT_LAT + 3, $sformatf("trylock hit latency %0d", lat));
    hold(5, rs.lo, rs.hi, LK_EX, rs.lt_idx);
    chk(lt_occupancy == 1, "one entry");
    xact(5, mk(OP_TRYLOCK, 100, 100, LK_EX, 0, 0, 0, 0), rs, lat);
    chk(!rs.ok, "trylock miss");
    chk(lat == L0 + UT_LAT + 2, $sformatf("trylock miss latency %0d", lat));
    xact(7, mk(OP_LOCK, 32, 127, LK_SH, 0, 0, 0, 0), rs, lat);
    chk(!rs.ok, "shared lock partly over another tile's exclusive leaf waits");
    xact(6, mk(OP_LOCK, 0, 4095, LK_SH, 0, 0, 0, 0), rs, lat);
    chk(rs.ok, "root shared over an exclusive leaf");
    chk(lat == L0 + LT_LAT + 1, $sformatf("shared lock latency %0d", lat));
    hold(6, 0, 4095, LK_SH, rs.lt_idx);
    release_lock(6, 0);
    release_lock(5, 1);
    chk(lt_occupancy == 0, "table empty");
    // phase 2: everyone
    go = 1;
    wait (tiles_done == N);
    repeat (400) @(negedge clk);
    chk(lt_occupancy == 0, "every lock released");
    chk(ix_sent == 2000 && ix_res == 2000, "every index lookup answered");
    $display("range locks: joins %0d fresh-sh %0d fresh-ex %0d denied-fresh %0d denied-trim %0d gave-up %0d",
             n_join, n_fresh_sh, n_fresh_ex, n_deny_fresh, n_deny_trim, n_gave_up);
    $display("  trims in place %0d split %0d, expansions refused %0d, checks on exclusive %0d clear %0d",
             n_trim_inplace, n_trim_split, n_expand_refused, n_check_locked, n_check_free);
    $display("  fills %0d refused %0d, unlocks registered %0d plain %0d, trylock hits %0d misses %0d",
             n_fill_ok, n_fill_refused, n_unlock_reg, n_unlock_plain, n_try_hit, n_try_miss);
    $display("  contended clocks %0d, most LTable entries %0d, time %0d clocks",
             n_contend, max_occ, now);
    $display("index cache: hits %0d misses %0d refills %0d shortened %0d leaf answers %0d reads %0d",
             ix_n_hit, ix_n_miss, ix_n_fill, ix_short, ix_leaf_ans, n_reads);
    chk(n_join > 0, "mechanism: join of a shared entry");
    chk(n_fresh_ex > 0, "mechanism: fresh exclusive lock");
    chk(n_deny_fresh + n_deny_trim > 0 && n_deny_trim > 0, "mechanism: conflict denied");
    chk(n_trim_inplace > 0, "mechanism: trim in place");
    chk(n_trim_split > 0, "mechanism: trim out of a shared entry");
    chk(n_expand_refused > 0, "mechanism: expansion refused");
    chk(n_check_locked > 0 && n_check_free > 0, "mechanism: reader check");
    chk(n_fill_ok > 0, "mechanism: fill");
    chk(n_unlock_reg > 0, "mechanism: unlock registers in the UTable");
    chk(n_try_hit > 0 && n_try_miss > 0, "mechanism: trylock hit and miss");
    chk(n_contend > 0, "mechanism: arbitration between tiles");
    chk(ix_n_hit > 0 && ix_n_miss > 0 && ix_n_fill > 0, "mechanism: index cache hit, miss, refill");
    chk(ix_leaf_ans > 0 && ix_short > ix_leaf_ans, "mechanism: leaf answer and shortened walk");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000;
    failures++;
    $display("FAIL watchdog: %0d tiles done, %0d index results", tiles_done, ix_res);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
