// tb_rblox_ctrl: the lock API end to end on the controller with its two
// tables (8 tiles; UTable 4 banks x 4 sets x 2 ways, 8-key segments;
// 5-cycle table accesses). The sequence follows the document's B+tree walk:
// two updates enter with a shared lock on the root range [4,42], one trims
// it to the safe node [15,31] and makes it exclusive, an overlapping
// exclusive request waits, a lock may not expand, readers validate, the
// unlock registers [15,31] as unlocked and safe, and a later update grabs it
// instantly with r_trylock. Each response is compared with the expected
// value and each operation's latency with the cycle count worked out from
// the table latencies.
module tb_rblox_ctrl;
  import rblox_pkg::*;
  localparam int LT = 5, UT = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, resp_valid, resp_ready;
  rb_req_t req;
  rb_resp_t resp;
  logic [3:0] lt_occupancy;
  int checks = 0, failures = 0;

  rblox_ctrl #(.N_TILES(8), .LT_LAT(LT), .UT_LAT(UT), .UT_BANKS(4), .UT_SETS(4), .UT_WAYS(2),
               .SEG_BITS(3)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  rb_resp_t r;

  task automatic run(input op_e op, input int tile, input key_t lo, hi, input lock_e lt,
                     input logic trim, input int idx, input ptr_t p, input logic safe, input int lat);
    int n;
    @(negedge clk);
    req = '0;
    req.op = op; req.tile = tile_t'(tile); req.lo = lo; req.hi = hi; req.ltype = lt;
    req.trim = trim; req.lt_idx = ltidx_t'(idx); req.node_ptr = p; req.safe = safe;
    req_valid = 1;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    req_valid = 0;
    n = 1;
    #1;
    while (!resp_valid) begin @(negedge clk); n++; #1; end
    r = resp;
    chk(n == lat, $sformatf("%s tile %0d latency %0d, expected %0d", op.name(), tile, n, lat));
    chk(r.op == op && r.tile == tile_t'(tile), "response routing");
  endtask

  localparam int L1 = LT + 1;              // LTable only
  localparam int L2 = LT + 1 + UT + 1;     // LTable, then UTable
  localparam int L3 = 2 * (UT + 1) + LT + 1;

  initial begin
    int a, b, c;
    req_valid = 0; req = '0; resp_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // two updates enter through the root range, shared
    run(OP_LOCK, 1, 4, 42, LK_SH, 0, 0, 0, 0, L1);
    chk(r.ok, "T1 shared root"); a = int'(r.lt_idx);
    run(OP_LOCK, 2, 4, 42, LK_SH, 0, 0, 0, 0, L1);
    chk(r.ok && int'(r.lt_idx) == a, "T2 joins the same entry");
    chk(lt_occupancy == 1, "one entry for two sharers");
    // T1 reaches the safe node [15,31]: trim and switch to exclusive
    run(OP_LOCK, 1, 15, 31, LK_EX, 1, a, 0, 0, L2 + 1);
    chk(r.ok && int'(r.lt_idx) != a, "T1 trims out of the shared entry"); b = int'(r.lt_idx);
    chk(lt_occupancy == 2, "two entries");
    // T3 asks for [12,24] exclusive: overlaps T1's [15,31]
    run(OP_LOCK, 3, 12, 24, LK_EX, 0, 0, 0, 0, L1);
    chk(!r.ok, "T3 must wait (mutual exclusion)");
    // T2, now alone on the root entry, trims in place to [7,14] exclusive
    run(OP_LOCK, 2, 7, 14, LK_EX, 1, a, 0, 0, L2);
    chk(r.ok && int'(r.lt_idx) == a, "T2 trims in place");
    // a lock may not expand, even over free keys
    run(OP_LOCK, 1, 15, 34, LK_EX, 1, b, 0, 0, L1);
    chk(!r.ok, "expansion refused");
    // only a holder may contract
    run(OP_LOCK, 4, 16, 20, LK_EX, 1, b, 0, 0, L1);
    chk(!r.ok, "non-holder may not trim");
    // readers validate
    run(OP_CHECK, 5, 21, 21, LK_SH, 0, 0, 0, 0, L1);
    chk(!r.ok && r.locked_ex && r.locked_any, "key 21 is locked exclusive");
    run(OP_CHECK, 5, 35, 40, LK_SH, 0, 0, 0, 0, L1);
    chk(r.ok && !r.locked_any, "[35,40] is free");
    // a fresh shared lock overlapping an exclusive one waits
    run(OP_LOCK, 6, 30, 45, LK_SH, 0, 0, 0, 0, L1);
    chk(!r.ok, "shared request over an exclusive range waits");
    // T1 finishes: unlock and register [15,31] as unlocked and safe
    run(OP_UNLOCK, 1, 0, 0, LK_EX, 0, b, 32'h1531, 1, L2);
    chk(r.ok, "T1 unlock");
    chk(lt_occupancy == 1, "entry freed");
    // unlock of an entry the tile does not hold
    run(OP_UNLOCK, 3, 0, 0, LK_EX, 0, b, 0, 0, L1);
    chk(!r.ok, "unlock by a non-holder refused");
    // T4 inserts key 25: instant lock of [15,31] from the UTable
    run(OP_TRYLOCK, 4, 25, 0, LK_EX, 0, 0, 0, 0, L3);
    chk(r.ok && r.node_ptr == 32'h1531 && r.lo == 15 && r.hi == 31, "trylock grabs [15,31]");
    c = int'(r.lt_idx);
    // the range moved out of the UTable
    run(OP_TRYLOCK, 5, 21, 0, LK_EX, 0, 0, 0, 0, UT + 2);
    chk(!r.ok && r.node_ptr == 0, "second trylock misses");
    run(OP_UNLOCK, 4, 0, 0, LK_EX, 0, c, 0, 0, L1);
    chk(r.ok, "T4 unlock without registering");
    run(OP_TRYLOCK, 5, 21, 0, LK_EX, 0, 0, 0, 0, UT + 2);
    chk(!r.ok, "plain unlock does not register");
    // a reader registers a safe unlocked range
    run(OP_FILL, 6, 32, 39, LK_SH, 0, 0, 32'h3239, 1, L2);
    chk(r.ok, "fill stored");
    run(OP_FILL, 6, 8, 9, LK_SH, 0, 0, 32'h0809, 1, L1);
    chk(!r.ok, "fill over a locked range refused");
    // a trylock whose range is locked fails: T2 holds [7,14]; register [7,14]
    // would break the rules, so register [0,7] instead and probe key 3
    run(OP_FILL, 6, 0, 6, LK_SH, 0, 0, 32'h0006, 1, L2);
    chk(r.ok, "fill [0,6]");
    run(OP_TRYLOCK, 7, 35, 0, LK_EX, 0, 0, 0, 0, L3);
    chk(r.ok && r.node_ptr == 32'h3239, "trylock of a filled range");
    run(OP_LOCK, 6, 36, 45, LK_SH, 0, 0, 0, 0, L1);
    chk(!r.ok, "shared lock partly over the grabbed range waits");
    run(OP_LOCK, 6, 30, 45, LK_SH, 0, 0, 0, 0, L1);
    chk(r.ok, "shared lock covering the grabbed range enters");
    run(OP_LOCK, 0, 0, 63, LK_EX, 0, 0, 0, 0, L1);
    chk(!r.ok, "exclusive lock over a shared one it does not fit in waits");
    chk(lt_occupancy == 3, "T2, T7 and T6 hold entries");
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
